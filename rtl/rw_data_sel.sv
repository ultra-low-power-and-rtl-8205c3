// Read/write data selection between the core and memory (little-endian).
// Read side: a byte or halfword read from memory is moved down to the bottom
// of the word and zero- or sign-extended; a word read from an address that is
// not a multiple of four is rotated right by eight bits per byte of offset,
// as ARMv4 defines for LDR. Write side: a byte is copied to all four byte
// lanes and a halfword to both halves, so that the memory takes the lane
// that the address selects. Combinational. The lane copying and the
// extension follow the document; the LDR rotation is the ARMv4 rule, which
// the document does not mention.
module rw_data_sel
  import acarm7_pkg::*;
(
  input  size_e       size,
  input  logic [1:0]  addr_lo,
  input  logic        sign,     // sign-extend a byte/halfword read
  input  logic [31:0] mem_rdata,
  output logic [31:0] rdata,
  input  logic [31:0] reg_wdata,
  output logic [31:0] mem_wdata
);
  logic [7:0]  byte_sel;
  logic [15:0] half_sel;
  always_comb begin
    byte_sel = mem_rdata[8*addr_lo +: 8];
    half_sel = addr_lo[1] ? mem_rdata[31:16] : mem_rdata[15:0];
    unique case (size)
      SZ_BYTE: rdata = sign ? {{24{byte_sel[7]}}, byte_sel} : {24'd0, byte_sel};
      SZ_HALF: rdata = sign ? {{16{half_sel[15]}}, half_sel} : {16'd0, half_sel};
      default: rdata = (mem_rdata >> (8 * addr_lo)) | (mem_rdata << (32 - 8 * addr_lo));
    endcase
    unique case (size)
      SZ_BYTE: mem_wdata = {4{reg_wdata[7:0]}};
      SZ_HALF: mem_wdata = {2{reg_wdata[15:0]}};
      default: mem_wdata = reg_wdata;
    endcase
  end
endmodule
