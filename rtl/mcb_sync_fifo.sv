// mcb_sync_fifo -- small single-clock FIFO used on both sides of the UART.
//
// DEPTH entries of WIDTH bits in a register array with read and write
// pointers one bit wider than the address (full when they differ only in
// that bit). Valid/ready on both sides: a word is written when in_valid and
// in_ready are high, read when out_valid and out_ready are high. out_data
// shows the oldest word combinationally. DEPTH must be a power of two.
module mcb_sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;

  assign in_ready  = (wp != {~rp[AW], rp[AW-1:0]});
  assign out_valid = (wp != rp);
  assign out_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wp[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (in_valid && in_ready)   wp <= wp + 1'b1;
      if (out_valid && out_ready) rp <= rp + 1'b1;
    end
  end
endmodule
