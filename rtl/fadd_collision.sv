// Result collision logic of the variable latency adder.
//
// An operation can finish after its first, second or third cycle, so results
// of operations issued on different cycles may be ready on the same cycle. The
// adder has one result port. This block grants it to the oldest ready result
// (third stage, then second, then first) and tells each younger ready result
// that it lost; a loser is carried one stage further down the pipeline and
// competes again there. The third stage always wins, so no operation takes
// more than three cycles and the adder never stalls its input. The one-hot
// multiplexor stands in for the tri-state result bus of the original circuit.
// Combinational.
module fadd_collision #(
  parameter int DW = 70
) (
  input  logic          rdy1,   // new operation finished in its first cycle
  input  logic          rdy2,   // operation finished in its second cycle
  input  logic          rdy3,   // operation finished in its third cycle
  input  logic [DW-1:0] d1,
  input  logic [DW-1:0] d2,
  input  logic [DW-1:0] d3,
  output logic          out_valid,
  output logic [DW-1:0] out_data,
  output logic [1:0]    out_stage,   // 1, 2 or 3: stage that drove the port
  output logic          defer1,      // first-stage result must wait
  output logic          defer2       // second-stage result must wait
);
  logic g1, g2, g3;

  assign g3 = rdy3;
  assign g2 = rdy2 & ~rdy3;
  assign g1 = rdy1 & ~rdy2 & ~rdy3;

  assign defer2 = rdy2 & rdy3;
  assign defer1 = rdy1 & (rdy2 | rdy3);

  assign out_valid = g1 | g2 | g3;
  assign out_data  = ({DW{g1}} & d1) | ({DW{g2}} & d2) | ({DW{g3}} & d3);
  assign out_stage = g3 ? 2'd3 : (g2 ? 2'd2 : (g1 ? 2'd1 : 2'd0));

endmodule
