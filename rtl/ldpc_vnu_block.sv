// ldpc_vnu_block -- L parallel variable node units with hard decision.
//
// One block column of the parity check matrix is processed per clock: lane j
// is the variable node j of that block column. It adds its channel LLR and the
// check-to-variable messages of all used slots (one slot per non-zero block of
// the column, top to bottom), returns to each slot the total minus that slot's
// own message (saturated to +/-31), and decides the bit: 1 when the total is
// negative, else 0.
//
// Purely combinational: results are written back to the message register file
// at the end of the same clock cycle. Processing L variable nodes of one
// block column per clock follows the grouping the design uses (n cycles for
// all variable node updates); the widths and saturation are this design's
// choices.
module ldpc_vnu_block
  import ldpc_pkg::*;
#(
  parameter int L = Z_MAX                   // lanes = expansion factor
) (
  input  msg_t           ch         [L],    // channel LLRs of the column
  input  logic           slot_valid [DV],   // slot k is a non-zero block of the column
  input  msg_t           c2v        [DV][L],// check-to-variable messages, variable order
  output msg_t           v2c        [DV][L],// variable-to-check messages, variable order
  output logic           hard       [L]     // hard decision (1 = bit one)
);

  localparam int TW = W + $clog2(DV + 1) + 1;

  always_comb begin
    for (int j = 0; j < L; j++) begin
      logic signed [TW-1:0] tot;
      tot = TW'(ch[j]);
      for (int k = 0; k < DV; k++)
        if (slot_valid[k]) tot = tot + TW'(c2v[k][j]);
      for (int k = 0; k < DV; k++)
        v2c[k][j] = slot_valid[k] ? sat_msg(16'(tot - TW'(c2v[k][j]))) : '0;
      hard[j] = tot[TW-1];
    end
  end

endmodule
