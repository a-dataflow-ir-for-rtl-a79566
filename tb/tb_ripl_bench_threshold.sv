// tb_ripl_bench_threshold: checks thresholding against the frame maximum,
// p > (max - 50) ? 255 : 0, on 6 x 4 frames: random frames, a frame whose
// maximum is below 50 (every pixel passes), and a frame with one bright
// outlier. The image must be held in the frame FIFO while the maximum is
// found: the first output of the unstalled first frame may only appear after
// all M*N pixels have entered, which is checked.
module tb_ripl_bench_threshold;
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

  localparam int M = 6, N = 4, FRAMES = 4;
  ripl_bench_threshold #(.M(M), .N(N), .OFFSET(50)) dut (.clk, .rst, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);
  task automatic on_out_token();
    if (n_got_out == 1) check(n_in_in >= M * N, $sformatf("first output after %0d pixels", n_in_in));
    if (n_got_out == M * N) stall_mode = 1;
  endtask
  task automatic finish_checks(); check(n_got_out == FRAMES * M * N, "count"); endtask

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      int img[M * N], mx;
      mx = 0;
      for (int i = 0; i < M * N; i++) begin
        img[i] = (f == 2) ? $urandom_range(0, 40) : (f == 3 ? $urandom_range(0, 100) : $urandom_range(0, 255));
        if (f == 3 && i == 7) img[i] = 250;
        src_in.push_back(img[i]);
        if (img[i] > mx) mx = img[i];
      end
      for (int i = 0; i < M * N; i++) exp_out.push_back(img[i] > mx - 50 ? 255 : 0);
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
