// tb_ssd_block_unit: self-checking test of the N x N block SSD unit.
// Random 6x6 block pairs (with some identical and some extreme blocks) are
// pushed one per cycle; each SSD is computed here and the three-cycle latency
// from in_valid to out_valid is checked.
//
// The expected results are worked out here from the stimulus, independently
// of the design under test; the sizes and the stimulus are this test's own
// choices, the timings checked are the design's.
module tb_ssd_block_unit;
  localparam int N = 6;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [N*8-1:0] left_rows [N], right_rows [N];
  logic [22:0] ssd;
  logic out_valid;
  int checks = 0, failures = 0;
  int exp_q[$];
  logic [2:0] hist = '0;

  ssd_block_unit #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (out_valid !== hist[2]) begin failures++; $display("latency mismatch"); end
      if (out_valid) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (int'(ssd) != e) begin failures++; $display("ssd %0d expected %0d", ssd, e); end
      end
    end
    hist <= {hist[1:0], in_valid};
  end

  initial begin
    for (int r = 0; r < N; r++) begin left_rows[r] = '0; right_rows[r] = '0; end
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      int s;
      s = 0;
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      for (int r = 0; r < N; r++)
        for (int k = 0; k < N; k++) begin
          logic [7:0] p, q;
          p = 8'($urandom);
          q = (i % 10 == 3) ? p : 8'($urandom);
          if (i % 37 == 5) begin p = 8'hFF; q = 8'h00; end
          left_rows[r][8*k +: 8]  = p;
          right_rows[r][8*k +: 8] = q;
          s += (int'(p) - int'(q)) * (int'(p) - int'(q));
        end
      if (in_valid) exp_q.push_back(s);
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(posedge clk);
    if (exp_q.size() != 0) begin failures++; $display("results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
