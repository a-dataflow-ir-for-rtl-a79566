// tb_ripl_fold_vector: checks foldVector computing a 16-bin histogram
// (hist[p]++, bins start at 0) over 8 x 6 frames of 4-bit pixels. After each
// frame the 16 bins must come out in order, and the bins must restart at 0
// for the next frame; repeated pixel values in consecutive cycles exercise
// the read-modify-write of the same bin.
module tb_ripl_fold_vector;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;
  bit stall_mode = 0;
  bit src_ready = 0;
  int t_first_in = -1;
  logic in_valid, in_ready;
  logic [4-1:0] in_data;
  longint src_in[$];
  int n_in_in = 0;
  logic out_valid, out_ready;
  logic [10-1:0] out_data;
  longint exp_out[$];
  int n_got_out = 0;
  bit done_out = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  localparam int M = 8, N = 6, A = 16, FRAMES = 4;
  logic [3:0] fp;
  logic [A-1:0][9:0] fv, fr;
  always_comb begin fr = fv; fr[fp] = fv[fp] + 1'b1; end
  ripl_fold_vector #(.M(M), .N(N), .A(A), .IN_W(4), .ACC_W(10), .INIT('0)) dut (.clk, .rst,
    .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data,
    .fn_pix(fp), .fn_vec(fv), .fn_res(fr));
  task automatic on_out_token(); if (n_got_out == A) stall_mode = 1; endtask
  task automatic finish_checks(); check(n_got_out == FRAMES * A, "count"); endtask

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      int h[A];
      for (int b = 0; b < A; b++) h[b] = 0;
      for (int i = 0; i < M * N; i++) begin
        int p;
        p = (f == 1) ? 3 : $urandom_range(0, A - 1);
        src_in.push_back(p);
        h[p]++;
      end
      for (int b = 0; b < A; b++) exp_out.push_back(h[b]);
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
      in_data = 4'(src_in[0]);
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
        check(out_data == 10'(exp_out[0]), $sformatf("out %0d: got %0d want %0d", n_got_out, out_data, $unsigned(10'(exp_out[0]))));
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
