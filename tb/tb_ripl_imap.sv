// tb_ripl_imap: checks the indexed-map skeleton with a 5-tap window
// ([.-2] .. [.+2]) over rows of M = 9 pixels. The test function weights the
// taps differently (sum of (j+1)*tap j) so a wrong tap order or a wrong edge
// pixel shows. Expected values come from a reference that clamps positions
// to the row. Row 0 runs with no stalls and its timing is checked: the last
// output of a row leaves M+POS cycles after its first pixel entered. Later
// rows run with random input gaps and random output backpressure.
module tb_ripl_imap;
  localparam int M = 9, NEG = 2, POS = 2, ROWS = 12;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data;
  logic [15:0] out_data, fn_res;
  logic [NEG+POS:0][7:0] fn_arg;

  always_comb begin
    fn_res = '0;
    for (int j = 0; j <= NEG + POS; j++) fn_res += 16'(j + 1) * 16'(fn_arg[j]);
  end

  ripl_imap #(.M(M), .NEG(NEG), .POS(POS), .IN_W(8), .OUT_W(16)) dut (.*);

  byte unsigned img[ROWS][M];
  shortint unsigned exp_q[$];
  byte unsigned src[$];
  bit stall_mode = 0;
  int t_first_in = -1, t_last_out0 = -1, n_got = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int x = 0; x < M; x++) begin
        int s;
        img[r][x] = 8'($urandom);
        src.push_back(img[r][x]);
      end
    for (int r = 0; r < ROWS; r++)
      for (int x = 0; x < M; x++) begin
        int s; s = 0;
        for (int j = 0; j <= NEG + POS; j++) begin
          int p; p = x + j - NEG;
          if (p < 0) p = 0;
          if (p > M - 1) p = M - 1;
          s += (j + 1) * img[r][p];
        end
        exp_q.push_back(16'(s));
      end
  end

  // driver
  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    while (src.size() > 0) begin
      bit took;
      // a token offered and not taken is held; otherwise offer the next one
      if (!in_valid) in_valid = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
      in_data = src[0];
      #1;
      took = in_valid && in_ready;
      if (took) begin
        if (t_first_in < 0) t_first_in = cyc;
        void'(src.pop_front());
      end
      @(posedge clk); #1;
      if (took) in_valid = 0;
    end
    in_valid = 0;
  end

  // monitor
  initial begin
    out_ready = 0;
    @(negedge rst);
    while (exp_q.size() > 0) begin
      out_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;
      #2;
      if (out_valid && out_ready) begin
        check(out_data == exp_q[0], $sformatf("output %0d: got %0d want %0d", n_got, out_data, exp_q[0]));
        void'(exp_q.pop_front());
        n_got++;
        if (n_got == M) begin
          t_last_out0 = cyc;
          check(t_last_out0 - t_first_in == M + POS,
                $sformatf("row latency %0d, want %0d", t_last_out0 - t_first_in, M + POS));
          stall_mode = 1;
        end
      end
      @(posedge clk); #1;
    end
    check(n_got == ROWS * M, "output count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
