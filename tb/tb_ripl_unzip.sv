// tb_ripl_unzip: checks the unzip skeleton with A = 2 and the functions
// \[a,b] -> a+b and \[c,d] -> c^d, under random gaps and independent random
// backpressure on the two outputs. Each output must receive one result per
// input vector, in order.
module tb_ripl_unzip;
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
  logic o1_valid, o1_ready;
  logic [8-1:0] o1_data;
  longint exp_o1[$];
  int n_got_o1 = 0;
  bit done_o1 = 0;
  logic o2_valid, o2_ready;
  logic [8-1:0] o2_data;
  longint exp_o2[$];
  int n_got_o2 = 0;
  bit done_o2 = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask

  localparam int NV = 80;
  logic [1:0][7:0] fa;
  logic [7:0] r1, r2;
  assign r1 = fa[0] + fa[1];
  assign r2 = fa[0] ^ fa[1];
  ripl_unzip #(.A(2), .IN_W(8), .OUT_W(8)) dut (.clk, .rst, .in_valid, .in_ready, .in_data,
    .out1_valid(o1_valid), .out1_ready(o1_ready), .out1_data(o1_data),
    .out2_valid(o2_valid), .out2_ready(o2_ready), .out2_data(o2_data),
    .fn_arg(fa), .fn_res1(r1), .fn_res2(r2));
  task automatic on_o1_token(); endtask
  task automatic on_o2_token(); endtask
  task automatic finish_checks(); check(n_got_o1 == NV && n_got_o2 == NV, "count"); endtask

  initial begin
    stall_mode = 1;
    for (int v = 0; v < NV; v++) begin
      byte unsigned a, b;
      a = 8'($urandom); b = 8'($urandom);
      src_in.push_back(a); src_in.push_back(b);
      exp_o1.push_back(8'(a + b)); exp_o2.push_back(a ^ b);
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

  // monitor for o1
  initial begin
    o1_ready = 0;
    @(negedge rst);
    #1;
    while (exp_o1.size() > 0) begin
      o1_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;
      #2;
      if (o1_valid && o1_ready) begin
        check(o1_data == 8'(exp_o1[0]), $sformatf("o1 %0d: got %0d want %0d", n_got_o1, o1_data, $unsigned(8'(exp_o1[0]))));
        void'(exp_o1.pop_front());
        n_got_o1++;
        on_o1_token();
      end
      @(posedge clk); #1;
    end
    o1_ready = 0;
    done_o1 = 1;
  end

  // monitor for o2
  initial begin
    o2_ready = 0;
    @(negedge rst);
    #1;
    while (exp_o2.size() > 0) begin
      o2_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;
      #2;
      if (o2_valid && o2_ready) begin
        check(o2_data == 8'(exp_o2[0]), $sformatf("o2 %0d: got %0d want %0d", n_got_o2, o2_data, $unsigned(8'(exp_o2[0]))));
        void'(exp_o2.pop_front());
        n_got_o2++;
        on_o2_token();
      end
      @(posedge clk); #1;
    end
    o2_ready = 0;
    done_o2 = 1;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    wait (done_o1 && done_o2);
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
