// mcb_synchronizer -- brings an asynchronous level (a NIM trigger, a
// WAGASCI signal) into the clock domain of the receiving logic.
//
// A chain of STAGES flip-flops; the output follows the input STAGES clock
// edges later. WIDTH independent bits are synchronized in parallel, so a
// multi-bit bus must only be passed when it is stable (the spill number is
// not passed through here: it is stable 4 us after the beam trigger and is
// sampled then). Two stages is the usual choice; the firmware diagram only
// names the block.
module mcb_synchronizer #(
  parameter int unsigned WIDTH  = 1,
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] ff [STAGES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < STAGES; i++) ff[i] <= '0;
    end else begin
      ff[0] <= d;
      for (int i = 1; i < STAGES; i++) ff[i] <= ff[i-1];
    end
  end

  assign q = ff[STAGES-1];
endmodule
