// tb_ripl_zipwith: checks the zipWith skeleton with A = 2 and the function
// \[a,b] [c,d] -> [a+c, b-d] (mod 256) on two random streams that are
// offered with independent random gaps, so the inputs arrive out of step and
// the actor must pair them by position.
module tb_ripl_zipwith;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;
  bit stall_mode = 0;
  bit src_ready = 0;
  int t_first_in = -1;
  logic a_valid, a_ready;
  logic [8-1:0] a_data;
  longint src_a[$];
  int n_in_a = 0;
  logic b_valid, b_ready;
  logic [8-1:0] b_data;
  longint src_b[$];
  int n_in_b = 0;
  logic out_valid, out_ready;
  logic [8-1:0] out_data;
  longint exp_out[$];
  int n_got_out = 0;
  bit done_out = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  localparam int NV = 60;
  logic [1:0][7:0] fa, fb, fr;
  assign fr[0] = fa[0] + fb[0];
  assign fr[1] = fa[1] - fb[1];
  ripl_zipwith #(.A(2), .IN_W(8), .OUT_W(8)) dut (.clk, .rst,
    .a_valid, .a_ready, .a_data, .b_valid, .b_ready, .b_data,
    .out_valid, .out_ready, .out_data, .fn_arg_a(fa), .fn_arg_b(fb), .fn_res(fr));
  task automatic on_out_token(); endtask
  task automatic finish_checks(); check(n_got_out == 2 * NV, "count"); endtask

  initial begin
    stall_mode = 1;
    for (int v = 0; v < NV; v++) begin
      byte unsigned a, b, c, d;
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom); d = 8'($urandom);
      src_a.push_back(a); src_a.push_back(b); src_b.push_back(c); src_b.push_back(d);
      exp_out.push_back(8'(a + c)); exp_out.push_back(8'(b - d));
    end
    src_ready = 1;
  end

  // driver for a
  initial begin
    a_valid = 0; a_data = 0;
    @(negedge rst);
    while (!src_ready) @(posedge clk);
    #1;
    while (src_a.size() > 0) begin
      bit took;
      if (!a_valid) a_valid = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
      a_data = 8'(src_a[0]);
      #1;
      took = a_valid && a_ready;
      if (took) begin
        if (t_first_in < 0) t_first_in = cyc;
        void'(src_a.pop_front());
        n_in_a++;
      end
      @(posedge clk); #1;
      if (took) a_valid = 0;
    end
    a_valid = 0;
  end

  // driver for b
  initial begin
    b_valid = 0; b_data = 0;
    @(negedge rst);
    while (!src_ready) @(posedge clk);
    #1;
    while (src_b.size() > 0) begin
      bit took;
      if (!b_valid) b_valid = stall_mode ? ($urandom_range(2) != 0) : 1'b1;
      b_data = 8'(src_b[0]);
      #1;
      took = b_valid && b_ready;
      if (took) begin
        if (t_first_in < 0) t_first_in = cyc;
        void'(src_b.pop_front());
        n_in_b++;
      end
      @(posedge clk); #1;
      if (took) b_valid = 0;
    end
    b_valid = 0;
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
