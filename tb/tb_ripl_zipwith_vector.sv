// tb_ripl_zipwith_vector: checks zipWithVector with B = 16 and the lookup
// function \p v -> v[p mod 16] + p over 4 x 3 frames. Each frame is preceded
// by its own random vector; every pixel must see that frame's vector.
module tb_ripl_zipwith_vector;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;
  bit stall_mode = 0;
  bit src_ready = 0;
  int t_first_in = -1;
  logic v_valid, v_ready;
  logic [12-1:0] v_data;
  longint src_v[$];
  int n_in_v = 0;
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

  localparam int M = 4, N = 3, B = 16, FRAMES = 3;
  logic [7:0] fp;
  logic [B-1:0][11:0] fv;
  logic [11:0] fr;
  assign fr = fv[fp[3:0]] + 12'(fp);
  ripl_zipwith_vector #(.M(M), .N(N), .B(B), .IN_W(8), .V_W(12), .OUT_W(12)) dut (.clk, .rst,
    .v_valid, .v_ready, .v_data, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .fn_pix(fp), .fn_vec(fv), .fn_res(fr));
  task automatic on_out_token(); if (n_got_out == M * N) stall_mode = 1; endtask
  task automatic finish_checks(); check(n_got_out == FRAMES * M * N, "count"); check(n_in_v == FRAMES * B, "vectors used"); endtask

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      int vec[B];
      for (int b = 0; b < B; b++) begin vec[b] = $urandom_range(0, 3000); src_v.push_back(vec[b]); end
      for (int i = 0; i < M * N; i++) begin
        byte unsigned p;
        p = 8'($urandom);
        src_in.push_back(p);
        exp_out.push_back((vec[p % 16] + p) & 12'hfff);
      end
    end
    src_ready = 1;
  end

  // driver for v
  initial begin
    v_valid = 0; v_data = 0;
    @(negedge rst);
    while (!src_ready) @(posedge clk);
    #1;
    while (src_v.size() > 0) begin
      bit took;
      if (!v_valid) v_valid = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
      v_data = 12'(src_v[0]);
      #1;
      took = v_valid && v_ready;
      if (took) begin
        if (t_first_in < 0) t_first_in = cyc;
        void'(src_v.pop_front());
        n_in_v++;
      end
      @(posedge clk); #1;
      if (took) v_valid = 0;
    end
    v_valid = 0;
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
