// tb_ripl_transpose: checks the transpose skeleton on 5 x 3 frames: the
// output is each frame in column-major order. The first frame is unstalled
// and its first output must leave M*N cycles after its first pixel entered
// (the whole frame is buffered first).
module tb_ripl_transpose;
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
  logic [8-1:0] out_data;
  longint exp_out[$];
  int n_got_out = 0;
  bit done_out = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  localparam int M = 5, N = 3, FRAMES = 4;
  ripl_transpose #(.M(M), .N(N), .W(8)) dut (.clk, .rst,
    .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);
  task automatic on_out_token();
    if (n_got_out == 1) check(cyc - t_first_in == M * N, $sformatf("first output after %0d", cyc - t_first_in));
    if (n_got_out == M * N) stall_mode = 1;
  endtask
  task automatic finish_checks(); check(n_got_out == FRAMES * M * N, "count"); endtask

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      int img[N][M];
      for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) begin
        img[y][x] = $urandom_range(0, 255); src_in.push_back(img[y][x]);
      end
      for (int x = 0; x < M; x++) for (int y = 0; y < N; y++) exp_out.push_back(img[y][x]);
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
        check(out_data == 8'(exp_out[0]), $sformatf("out %0d: got %0d want %0d", n_got_out, out_data, $unsigned(8'(exp_out[0]))));
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
