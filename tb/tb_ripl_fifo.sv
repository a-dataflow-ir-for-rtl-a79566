// tb_ripl_fifo: checks the dataflow-wire FIFO.
// Pushes random tokens with random gaps into a 4-deep FIFO while the reader
// applies random backpressure, and checks that every token comes out once, in
// order; checks that the FIFO reports full after exactly DEPTH writes with no
// reads, and that a depth-1 wire can pass one token per cycle.
module tb_ripl_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [7:0] in_data, out_data;
  logic v1_in, r1_in, v1_out, r1_out;
  logic [7:0] d1_in, d1_out;

  ripl_fifo #(.W(8), .DEPTH(DEPTH)) dut (.*);
  ripl_fifo #(.W(8), .DEPTH(1)) dut1 (.clk, .rst, .in_valid(v1_in), .in_ready(r1_in), .in_data(d1_in),
    .out_valid(v1_out), .out_ready(r1_out), .out_data(d1_out));

  byte unsigned exp_q[$];
  int n_out = 0;
  localparam int NTOK = 300;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    in_valid = 0; in_data = 0; out_ready = 0;
    v1_in = 0; d1_in = 0; r1_out = 0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    // fill without reading
    for (int i = 0; i < DEPTH; i++) begin
      in_valid = 1; in_data = 8'(i + 100);
      @(posedge clk); #1;
      exp_q.push_back(8'(i + 100));
    end
    in_valid = 0;
    check(!in_ready && out_valid, "full after DEPTH writes");
    // random traffic
    for (int i = 0; i < NTOK; i++) begin
      if (!(in_valid && !in_ready)) begin   // hold an offered token until taken
        in_valid = ($urandom_range(3) != 0);
        in_data  = 8'($urandom);
      end
      out_ready = ($urandom_range(2) != 0);
      #1;
      if (out_valid && out_ready) begin
        check(exp_q.size() > 0 && out_data == exp_q[0], $sformatf("order at %0d", n_out));
        void'(exp_q.pop_front()); n_out++;
      end
      if (in_valid && in_ready) exp_q.push_back(in_data);
      @(posedge clk); #1;
    end
    in_valid = 0; out_ready = 1; #1;
    while (out_valid) begin
      check(out_data == exp_q[0], "drain order"); void'(exp_q.pop_front());
      @(posedge clk); #1;
    end
    check(exp_q.size() == 0, "all tokens out");
    // depth-1 wire: 20 tokens in 20 cycles with reader always ready
    r1_out = 1;
    for (int i = 0; i < 20; i++) begin
      v1_in = 1; d1_in = 8'(i * 3); #1;
      check(r1_in, "depth-1 ready while read");
      if (i > 0) check(v1_out && d1_out == 8'((i - 1) * 3), "depth-1 data");
      @(posedge clk); #1;
    end
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
