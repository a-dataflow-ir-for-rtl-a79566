// tb_ripl_dup: checks the lock-step stream duplicator.
// Random input validity and independent random readiness on both outputs.
// Every cycle: the input is taken only when both outputs take the token, both
// outputs carry the input data, and no output sees a token the other misses.
module tb_ripl_dup;
  int checks = 0, failures = 0;
  logic in_valid, in_ready, a_valid, a_ready, b_valid, b_ready;
  logic [7:0] in_data, a_data, b_data;
  int taken = 0;

  ripl_dup #(.W(8)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    for (int i = 0; i < 400; i++) begin
      in_valid = 1'($urandom); a_ready = 1'($urandom); b_ready = 1'($urandom);
      in_data = 8'($urandom);
      #1;
      check(in_ready == (a_ready && b_ready), "in_ready");
      check((a_valid && a_ready) == (in_valid && in_ready), "a transfer in lock step");
      check((b_valid && b_ready) == (in_valid && in_ready), "b transfer in lock step");
      check(a_data == in_data && b_data == in_data, "data copied");
      if (in_valid && in_ready) taken++;
      #1;
    end
    check(taken > 20, "tokens moved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
