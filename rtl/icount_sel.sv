// icount_sel: ICOUNT thread selection for a two-thread core.
//
// Picks the hardware thread with the fewest instructions in flight
// (icount). The ICOUNT policy itself follows the design description; the
// tie-break is this design's choice: on equal counts the threads take
// turns, the turn passing each cycle in which `advance` is high and the
// counts were equal.
//
// sel is combinational from icount and the turn register.
module icount_sel #(
  parameter int unsigned CW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          advance,
  input  logic [CW-1:0] icount [2],
  output logic          sel
);

  logic turn_q;
  logic tie;

  assign tie = (icount[0] == icount[1]);
  assign sel = tie ? turn_q : (icount[1] < icount[0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              turn_q <= 1'b0;
    else if (advance && tie) turn_q <= ~turn_q;
  end

endmodule
