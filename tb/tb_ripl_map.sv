// tb_ripl_map: checks the map skeleton with a 3-pixel to 2-pixel function,
// \[a,b,c] -> [a+b+c (mod 256), a^c], under random input gaps and random
// output backpressure. The expected output is computed in the testbench from
// the input sequence; with no stalls a vector takes A+B = 5 cycles.
module tb_ripl_map;
  localparam int A = 3, B = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data, out_data;
  logic [A-1:0][7:0] fn_arg;
  logic [B-1:0][7:0] fn_res;

  assign fn_res[0] = fn_arg[0] + fn_arg[1] + fn_arg[2];
  assign fn_res[1] = fn_arg[0] ^ fn_arg[2];

  ripl_map #(.A(A), .B(B), .IN_W(8), .OUT_W(8)) dut (.*);

  byte unsigned src[$], exp_q[$];
  localparam int NV = 40;
  int n_got = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int v = 0; v < NV; v++) begin
      byte unsigned a, b, c;
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      src.push_back(a); src.push_back(b); src.push_back(c);
      exp_q.push_back(8'(a + b + c)); exp_q.push_back(a ^ c);
    end
  end

  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    // unstalled timing of one vector
    for (int k = 0; k < A; k++) begin
      in_valid = 1; in_data = src.pop_front(); #1;
      check(in_ready, "ready while gathering");
      @(posedge clk); #1;
    end
    in_valid = 0;
    while (src.size() > 0) begin
      in_valid = ($urandom_range(3) != 0); in_data = src[0]; #1;
      if (in_valid && in_ready) void'(src.pop_front());
      @(posedge clk); #1;
    end
    in_valid = 0;
  end

  initial begin
    int t0;
    out_ready = 0;
    @(negedge rst);
    out_ready = 1;
    @(posedge clk); #2;
    t0 = $time;
    // first vector: A cycles to gather, then B outputs back to back
    for (int k = 0; k < B; k++) begin
      while (!out_valid) begin @(posedge clk); #2; end
      check(out_data == exp_q[0], "first vector data");
      void'(exp_q.pop_front()); n_got++;
      @(posedge clk); #2;
    end
    check(($time - t0) / 10 == A + B - 1 + 0 || ($time - t0) / 10 == A + B, "vector takes A+B cycles");
    while (exp_q.size() > 0) begin
      out_ready = ($urandom_range(2) != 0); #1;
      if (out_valid && out_ready) begin
        check(out_data == exp_q[0], $sformatf("data at %0d", n_got));
        void'(exp_q.pop_front()); n_got++;
      end
      @(posedge clk); #2;
    end
    check(n_got == NV * B, "output count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
