// tb_smac_engine: self-checking test of the squared-difference MAC engine.
// Random pixel words are fed with clear=1 (new sum) and clear=0 (accumulate);
// the expected accumulator is computed here from the pixel values.  The
// two-cycle latency from en to out_valid is checked on every input.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_smac_engine;
  localparam int P = 6;
  logic clk = 0, rst = 1, en = 0, clear = 0;
  logic [P*8-1:0] a = '0, b = '0;
  logic [29:0] acc;
  logic out_valid;
  int checks = 0, failures = 0;
  longint exp_q[$];
  longint model;

  smac_engine #(.PIXELS(P), .PIX_W(8), .ACC_W(30)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint sq_sum(logic [P*8-1:0] x, logic [P*8-1:0] y);
    longint s = 0;
    for (int k = 0; k < P; k++) begin
      int d;
      d = int'(x[8*k +: 8]) - int'(y[8*k +: 8]);
      s += d * d;
    end
    return s;
  endfunction

  // checker: every en cycle produces a result two cycles later
  logic [1:0] en_hist = '0;
  always @(posedge clk) begin
    if (!rst) begin
      if (out_valid !== en_hist[1]) begin
        failures++; $display("latency mismatch");
      end
      if (out_valid) begin
        longint e;
        e = exp_q.pop_front();
        checks++;
        if (longint'(acc) != e) begin
          failures++; $display("acc %0d expected %0d", acc, e);
        end
      end
    end
    en_hist <= {en_hist[0], en};
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    model = 0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en    = ($urandom_range(0, 3) != 0);
      clear = ($urandom_range(0, 4) == 0) || (i == 0);
      for (int k = 0; k < P; k++) begin
        a[8*k +: 8] = (i % 50 == 7) ? 8'hFF : 8'($urandom);
        b[8*k +: 8] = (i % 50 == 7) ? 8'h00 : 8'($urandom);
      end
      if (en) begin
        model = clear ? sq_sum(a, b) : model + sq_sum(a, b);
        exp_q.push_back(model);
      end
    end
    @(negedge clk); en = 0;
    repeat (5) @(posedge clk);
    if (exp_q.size() != 0) begin failures++; $display("results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
