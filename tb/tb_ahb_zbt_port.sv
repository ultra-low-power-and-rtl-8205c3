// Test of the AHB port onto a ZBT controller. A responder in the test bench
// answers each request after a random delay from a small memory. Random AHB
// reads and writes (with idle cycles) are checked for data, for HREADYOUT
// staying low until the answer, for the size mapping, and for requests
// being held back while "busy" is high (core owns the bank).
module tb_ahb_zbt_port;
  import acarm7_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        hsel = 1'b0, hwrite = 1'b0, hready, hreadyout, busy = 1'b0;
  logic [31:0] haddr = '0, hwdata = '0, hrdata;
  logic [1:0]  htrans = '0;
  logic [2:0]  hsize = 3'd2;
  logic        req, we, ready;
  logic [20:0] addr;
  size_e       size;
  logic [31:0] wdata, rdata;

  ahb_zbt_port dut (.clk, .rst_n, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
                    .hrdata, .hreadyout, .busy, .req, .we, .addr, .size, .wdata, .rdata, .ready);
  assign hready = hreadyout;

  always #5 clk = ~clk;

  int checks = 0, failures = 0, busy_hold = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // responder: answers a request after 0..3 extra cycles
  logic [31:0] mem [64];
  int          delay = 0;
  logic        busy_req_seen = 1'b0;
  always_ff @(posedge clk) begin
    if (busy && req) busy_req_seen <= 1'b1;
    if (req && !ready) begin
      if (delay == 0) delay <= $urandom_range(3) + 1;
      else delay <= delay - 1;
    end else delay <= 0;
  end
  assign ready = req && delay == 1;
  assign rdata = mem[addr[7:2]];
  always_ff @(posedge clk) if (req && ready && we) begin
    unique case (size)
      SZ_BYTE: mem[addr[7:2]][8*addr[1:0] +: 8] <= wdata[8*addr[1:0] +: 8];
      SZ_HALF: mem[addr[7:2]][16*addr[1] +: 16] <= wdata[16*addr[1] +: 16];
      default: mem[addr[7:2]] <= wdata;
    endcase
  end

  logic [31:0] ref_m [64];

  task automatic xfer(bit w, logic [31:0] a, int sz, logic [31:0] d, output logic [31:0] q);
    int waits;
    hsel = 1'b1; haddr = a; htrans = 2'b10; hwrite = w; hsize = 3'(sz);
    @(negedge clk);
    hsel = 1'b0; htrans = 2'b00;
    if (w) hwdata = d;
    check("request size", 32'(size), 32'(sz));
    check("request address", 32'(addr), a & 32'h1F_FFFF);
    waits = 0;
    while (!hreadyout) begin
      waits++;
      if (busy) busy_hold++;
      if (waits == 3 && busy) busy = 1'b0;
      @(negedge clk);
    end
    q = hrdata;
    checks++;
    if (waits == 0) begin failures++; $display("FAIL no wait state"); end
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] q, e, a;
    int sz;
    for (int i = 0; i < 64; i++) begin mem[i] = 32'd0; ref_m[i] = 32'd0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 600; n++) begin
      sz = $urandom_range(2);
      a  = $urandom_range(255) | 32'h0010_0000;
      if (sz == 1) a[0] = 1'b0;
      if (sz == 2) a[1:0] = 2'b00;
      busy = ($urandom_range(7) == 0);
      if ($urandom_range(1)) begin
        e = $urandom;
        xfer(1, a, sz, e, q);
        unique case (sz)
          0: ref_m[a[7:2]][8*a[1:0] +: 8] = e[8*a[1:0] +: 8];
          1: ref_m[a[7:2]][16*a[1] +: 16] = e[16*a[1] +: 16];
          default: ref_m[a[7:2]] = e;
        endcase
      end else begin
        xfer(0, a, sz, 32'd0, q);
        check("read data", q, ref_m[a[7:2]]);
      end
      repeat ($urandom_range(1)) @(negedge clk);
    end
    checks++;
    if (busy_hold == 0) begin failures++; $display("FAIL busy never held a transfer"); end
    check("no request while busy", 32'(busy_req_seen), 32'd0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
