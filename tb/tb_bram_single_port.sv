// tb_bram_single_port: self-checking test of the disparity memory (76800 x 8).
// Every word is written, then random reads and writes follow; read data is
// checked against a model exactly two cycles after the address.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_bram_single_port;
  localparam int W = 8, D = 76800, AW = $clog2(D);
  logic clk = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] model [D];
  logic [W-1:0] eq [$];
  int checks = 0, failures = 0;

  bram_single_port dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1; addr = AW'(i); din = 8'($urandom);
      model[i] = din;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (eq.size() == 2) begin
        logic [W-1:0] e; e = eq.pop_front();
        checks++; if (dout !== e) begin failures++; $display("%h vs %h", dout, e); end
      end
      addr = AW'($urandom_range(0, D - 1));
      we   = ($urandom_range(0, 3) == 0);
      din  = 8'($urandom);
      eq.push_back(model[addr]);
      if (we) model[addr] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
