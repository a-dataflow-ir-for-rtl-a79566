// tb_ripl_convolve_3x5: checks the convolve skeleton (and so the line buffer) with a
// 3-wide by 5-high window on 9 x 7 frames of random pixels, using an
// asymmetric kernel so that any mix-up of rows, columns or orientation shows.
// Edge taps repeat the nearest pixel. Also checks that the first result waits
// for (5-1)/2 rows and (3-1)/2+1 pixels, and that the buffer never runs
// more than (5-1)*M+3 pixels ahead. First frame unstalled, later frames
// with random gaps and backpressure.
module tb_ripl_convolve_3x5;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;
  bit stall_mode = 0;
  bit src_ready = 0;
  int t_first_in = -1;
  logic in_valid, in_ready;
  logic [8-1:0] in_data;
  longint src_in[$];
  int n_in_in = 0;
  logic out_valid, out_ready;
  logic [13-1:0] out_data;
  longint exp_out[$];
  int n_got_out = 0;
  bit done_out = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  localparam int M = 9, N = 7, FRAMES = 3, KX = 3, KY = 5;
  localparam int RX = (KX - 1) / 2, RY = (KY - 1) / 2;
  localparam int K [KX*KY] = '{2, 0, -1, 1, 3, -2, -1, 4, 1, 0, 5, 2, -3, 1, 2};
  ripl_convolve #(.M(M), .N(N), .IN_W(8), .OUT_W(13), .KX(KX), .KY(KY), .K(K)) dut (.clk, .rst,
    .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);
  function automatic int cl(int v, int lim); return v < 0 ? 0 : (v > lim - 1 ? lim - 1 : v); endfunction
  task automatic on_out_token();
    if (n_got_out == 1) check(n_in_in >= RY * M + RX + 1, $sformatf("first result after %0d pixels", n_in_in));
    check(n_in_in <= n_got_out - 1 + RY * M + RX + 2, $sformatf("input ran ahead: %0d in, %0d out", n_in_in, n_got_out));
    if (n_got_out == M * N) stall_mode = 1;
  endtask
  task automatic finish_checks(); check(n_got_out == FRAMES * M * N, "count"); endtask

  initial begin
    byte unsigned img[N][M];
    for (int f = 0; f < FRAMES; f++) begin
      for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) begin
        img[y][x] = 8'($urandom); src_in.push_back(img[y][x]);
      end
      for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) begin
        int s; s = 0;
        for (int dy = -RY; dy <= RY; dy++) for (int dx = -RX; dx <= RX; dx++)
          s += K[(dy + RY) * KX + dx + RX] * img[cl(y + dy, N)][cl(x + dx, M)];
        exp_out.push_back(longint'(s) & 64'h1fff);
      end
    end
    src_ready = 1;
  end

  // driver for in
  initial begin
    in_valid = 0; in_data = 0;
    @(negedge rst);
    while (!src_ready) @(posedge clk);
    #1;
    while (src_in.size() > 0) begin
      bit took;
      if (!in_valid) in_valid = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
      in_data = 8'(src_in[0]);
      #1;
      took = in_valid && in_ready;
      if (took) begin
        if (t_first_in < 0) t_first_in = cyc;
        void'(src_in.pop_front());
        n_in_in++;
      end
      @(posedge clk); #1;
      if (took) in_valid = 0;
    end
    in_valid = 0;
  end

  // monitor for out
  initial begin
    out_ready = 0;
    @(negedge rst);
    #1;
    while (exp_out.size() > 0) begin
      out_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;
      #2;
      if (out_valid && out_ready) begin
        check(out_data == 13'(exp_out[0]), $sformatf("out %0d: got %0d want %0d", n_got_out, out_data, $unsigned(13'(exp_out[0]))));
        void'(exp_out.pop_front());
        n_got_out++;
        on_out_token();
      end
      @(posedge clk); #1;
    end
    out_ready = 0;
    done_out = 1;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    wait (done_out);
    finish_checks();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
