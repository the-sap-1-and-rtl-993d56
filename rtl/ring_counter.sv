// ring_counter: the T-state counter of the SAP-1 control sequencer.
//
// A six-bit one-hot ring, t[0] = T1 ... t[5] = T6, that moves one place on
// each falling clock edge, so that the control signals decoded from it are
// steady before the rising edge at which the datapath acts on them. After T6
// it returns to T1. While en is low it holds its state (the sequencer uses
// this for hlt). clr (asynchronous, active high) puts it at T1. Six states,
// the falling edge and the return to T1 follow the notes; the one-hot ring
// and the enable are this design's choices.
module ring_counter
  import sap1_pkg::*;
(
  input  logic                 clk,
  input  logic                 clr,
  input  logic                 en,
  output logic [N_TSTATES-1:0] t
);

  always_ff @(negedge clk or posedge clr) begin
    if (clr)     t <= N_TSTATES'(1);
    else if (en) t <= {t[N_TSTATES-2:0], t[N_TSTATES-1]};
  end

endmodule
