// ripl_dup: duplicates one image stream onto two dataflow wires.
//
// When the output image of a skeleton is used in two places, the compiler
// shares the stream by sending every pixel token to both consumers in lock
// step. A token is accepted from the input only when both outputs can take it
// in the same cycle, so the two copies never drift apart; any slack between
// the consumers must come from the FIFOs placed after this actor.
//
// Interface: one valid/ready input, two valid/ready outputs carrying the same
// data. Purely combinational, zero latency.
module ripl_dup #(
  parameter int unsigned W = 8
) (
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         a_valid,
  input  logic         a_ready,
  output logic [W-1:0] a_data,
  output logic         b_valid,
  input  logic         b_ready,
  output logic [W-1:0] b_data
);
  assign in_ready = a_ready && b_ready;
  assign a_valid  = in_valid && b_ready;
  assign b_valid  = in_valid && a_ready;
  assign a_data   = in_data;
  assign b_data   = in_data;
endmodule
