// tb_ripl_window2d: checks the 2*M+3 line buffer of filter2D/convolve on
// 7 x 5 frames. The test function weights the nine taps differently (sum of
// (k+1)*p_k) so that a wrong tap or a wrong border pixel shows; the reference
// clamps neighbour coordinates to the image. Frame 0 runs unstalled and its
// timing is checked: the first result leaves M+2 cycles after the first pixel
// entered, the last M*N+M+1 cycles after it. Later frames run with random
// input gaps and random output backpressure. A probe checks that the buffer
// never holds more than 2*M+3 pixels still needed.
module tb_ripl_window2d;
  localparam int M = 7, N = 5, FRAMES = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data;
  logic [15:0] out_data, fn_res;
  logic [8:0][7:0] fn_arg;

  always_comb begin
    fn_res = '0;
    for (int k = 0; k < 9; k++) fn_res += 16'(k + 1) * 16'(fn_arg[k]);
  end

  ripl_window2d #(.M(M), .N(N), .IN_W(8), .OUT_W(16)) dut (.*);

  byte unsigned img[FRAMES][N][M];
  shortint unsigned exp_q[$];
  byte unsigned src[$];
  bit stall_mode = 0;
  int t_first_in = -1, n_got = 0, n_in = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int cl(int v, int lim);
    return v < 0 ? 0 : (v > lim - 1 ? lim - 1 : v);
  endfunction

  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < N; y++)
        for (int x = 0; x < M; x++) begin
          img[f][y][x] = 8'($urandom);
          src.push_back(img[f][y][x]);
        end
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < N; y++)
        for (int x = 0; x < M; x++) begin
          int s; s = 0;
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++)
              s += ((dy + 1) * 3 + dx + 2) * img[f][cl(y + dy, N)][cl(x + dx, M)];
          exp_q.push_back(16'(s));
        end
  end

  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    while (src.size() > 0) begin
      bit took;
      if (!in_valid) in_valid = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
      in_data = src[0];
      #1;
      took = in_valid && in_ready;
      if (took) begin
        if (t_first_in < 0) t_first_in = cyc;
        void'(src.pop_front());
        n_in++;
      end
      @(posedge clk); #1;
      if (took) in_valid = 0;
    end
    in_valid = 0;
  end

  initial begin
    out_ready = 0;
    @(negedge rst);
    while (exp_q.size() > 0) begin
      out_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;
      #2;
      if (out_valid && out_ready) begin
        if (n_got == 0) check(cyc - t_first_in == M + 2, $sformatf("first result after %0d cycles", cyc - t_first_in));
        check(out_data == exp_q[0], $sformatf("output %0d: got %0d want %0d", n_got, out_data, exp_q[0]));
        void'(exp_q.pop_front());
        n_got++;
        if (n_got == M * N) begin
          check(cyc - t_first_in == M * N + M + 1, $sformatf("frame took %0d cycles", cyc - t_first_in));
          stall_mode = 1;
        end
      end
      // pixels held after this edge: received this frame minus the oldest still needed
      if (n_got < M * N && n_in <= M * N) check(n_in - (n_got - M - 1 > 0 ? n_got - M - 1 : 0) <= 2 * M + 3, $sformatf("buffer bound in=%0d got=%0d", n_in, n_got));
      @(posedge clk); #1;
    end
    check(n_got == FRAMES * M * N, "output count");
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
