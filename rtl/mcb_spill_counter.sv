// mcb_spill_counter -- internal spill number counter of the Master Clock
// Board, used instead of the beam line's 16-bit spill number when the
// slow-control bit "internal spill NB increment" is set.
//
// It counts accepted beam triggers (inc, one-cycle pulse) and wraps at
// 16 bits. The 'r' command's "reset internal spill counter" bit (clr,
// one-cycle pulse) sets it back to zero; clr wins over inc. Counting
// triggers is this design's reading of "internal counter"; the clear comes
// from the specification.
module mcb_spill_counter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             inc,
  input  logic             clr,
  output logic [WIDTH-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (inc) count <= count + 1'b1;
  end
endmodule
