// tb_ripl_edge_blur: checks Sobel followed by the 5-tap row blur
// ([.-2]+[.-1]+[.]+[.+1]+[.+2])/3 on 8 x 5 frames. The reference runs the
// Sobel function on the frame, then the blur along each row with positions
// clamped to the row. The first frame is unstalled, the rest are stalled at
// random.
module tb_ripl_edge_blur;
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
  logic [12-1:0] out_data;
  longint exp_out[$];
  int n_got_out = 0;
  bit done_out = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  localparam int M = 8, N = 5, FRAMES = 3;
  ripl_edge_blur #(.M(M), .N(N), .EDGE_W(11), .BLUR_W(12)) dut (.clk, .rst, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);
  task automatic on_out_token(); if (n_got_out == M * N) stall_mode = 1; endtask
  task automatic finish_checks(); check(n_got_out == FRAMES * M * N, "count"); endtask

  function automatic int cl(int v, int lim); return v < 0 ? 0 : (v > lim - 1 ? lim - 1 : v); endfunction
  function automatic int sobel(int img[][], int x, int y, int m, int n);
    int p[9], gx, gy;
    for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++)
      p[(dy + 1) * 3 + dx + 1] = img[cl(y + dy, n)][cl(x + dx, m)];
    gy = (p[0] + 2 * p[1] + p[2]) - (p[6] + 2 * p[7] + p[8]);
    gx = (p[2] + 2 * p[5] + p[8]) - (p[0] + 2 * p[3] + p[6]);
    return (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
  endfunction

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      int img[][];
      int e[N][M];
      img = new[N];
      for (int y = 0; y < N; y++) begin
        img[y] = new[M];
        for (int x = 0; x < M; x++) begin img[y][x] = $urandom_range(0, 255); src_in.push_back(img[y][x]); end
      end
      for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) e[y][x] = sobel(img, x, y, M, N);
      for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) begin
        int s; s = 0;
        for (int d = -2; d <= 2; d++) s += e[y][cl(x + d, M)];
        exp_out.push_back(s / 3);
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
        check(out_data == 12'(exp_out[0]), $sformatf("out %0d: got %0d want %0d", n_got_out, out_data, $unsigned(12'(exp_out[0]))));
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
