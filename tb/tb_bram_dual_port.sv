// tb_bram_dual_port: self-checking test of the dual-port frame-buffer memory.
// Both ports write and read random addresses of a full-size (12800 x 48) memory;
// read data is checked against a model exactly two cycles after the address.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_bram_dual_port;
  localparam int W = 48, D = 12800, AW = $clog2(D);
  logic clk = 0;
  logic a_we = 0, b_we = 0;
  logic [AW-1:0] a_addr = '0, b_addr = '0;
  logic [W-1:0] a_din = '0, b_din = '0, a_dout, b_dout;
  logic [W-1:0] model [D];
  logic [W-1:0] ea [$], eb [$];
  int checks = 0, failures = 0;

  bram_dual_port dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill through port A
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      a_we = 1; a_addr = AW'(i); a_din = {16'($urandom), 32'($urandom)};
      model[i] = a_din;
    end
    @(negedge clk); a_we = 0;
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (ea.size() == 2) begin
        logic [W-1:0] e; e = ea.pop_front();
        checks++; if (a_dout !== e) begin failures++; $display("A %h vs %h", a_dout, e); end
      end
      if (eb.size() == 2) begin
        logic [W-1:0] e; e = eb.pop_front();
        checks++; if (b_dout !== e) begin failures++; $display("B %h vs %h", b_dout, e); end
      end
      a_addr = AW'($urandom_range(0, D - 1));
      b_addr = AW'($urandom_range(0, D - 1));
      if (b_addr == a_addr) b_addr = AW'((int'(a_addr) + 1) % D);
      a_we = ($urandom_range(0, 3) == 0);
      b_we = ($urandom_range(0, 3) == 0);
      a_din = {16'($urandom), 32'($urandom)};
      b_din = {16'($urandom), 32'($urandom)};
      ea.push_back(model[a_addr]);
      eb.push_back(model[b_addr]);
      if (a_we) model[a_addr] = a_din;
      if (b_we) model[b_addr] = b_din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
