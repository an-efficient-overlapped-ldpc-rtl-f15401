// ldpc_cnu_block -- L parallel check node units (sum-product rule).
//
// One block row of the parity check matrix is processed per clock: lane i is
// the check node i of that block row and receives one variable-to-check
// message per slot (one slot per non-zero block of the row, slot_valid marks
// the slots the row uses). Each lane computes, for every used slot k,
//   sign_k = XOR of the signs of the other inputs
//   mag_k  = phi( sum_{j != k} phi(|q_j|) )
// with phi the tabulated ldpc_pkg::phi_q. The sum over all slots is formed
// once and each slot's own term is subtracted (saturated to 31 before the
// second phi). Unused slots contribute nothing and output 0.
//
// Purely combinational: the block reads from and writes back to the message
// register file in the same clock cycle. Processing L check nodes of one
// block row per clock follows the grouping the design uses (L nodes per
// group, m cycles for all check node updates); the arithmetic format and the
// sum-and-subtract form are this design's choices.
module ldpc_cnu_block
  import ldpc_pkg::*;
#(
  parameter int L = Z_MAX                   // lanes = expansion factor
) (
  input  logic           slot_valid [DC],   // slot k is a non-zero block of the row
  input  msg_t           v2c        [DC][L],// variable-to-check messages, check order
  output msg_t           c2v        [DC][L] // check-to-variable messages, check order
);

  localparam int SUMW = MAGW + $clog2(DC) + 1;

  always_comb begin
    for (int i = 0; i < L; i++) begin
      logic [MAGW-1:0] ph   [DC];
      logic            sg   [DC];
      logic [SUMW-1:0] sum;
      logic            sgn;
      sum = '0;
      sgn = 1'b0;
      for (int k = 0; k < DC; k++) begin
        logic [MAGW:0] a;
        a = v2c[k][i][W-1] ? (MAGW+1)'(-v2c[k][i]) : (MAGW+1)'(v2c[k][i]);
        if (a > (MAGW+1)'(MSG_MAX)) a = (MAGW+1)'(MSG_MAX);
        sg[k] = slot_valid[k] & v2c[k][i][W-1];
        ph[k] = slot_valid[k] ? phi_q(a[MAGW-1:0]) : '0;
        sum   = sum + SUMW'(ph[k]);
        sgn   = sgn ^ sg[k];
      end
      for (int k = 0; k < DC; k++) begin
        logic [SUMW-1:0] ext;
        logic [MAGW-1:0] m;
        ext = sum - SUMW'(ph[k]);
        m   = phi_q(ext > SUMW'(MSG_MAX) ? MAGW'(MSG_MAX) : ext[MAGW-1:0]);
        if (!slot_valid[k])      c2v[k][i] = '0;
        else if (sgn ^ sg[k])    c2v[k][i] = -msg_t'({1'b0, m});
        else                     c2v[k][i] = msg_t'({1'b0, m});
      end
    end
  end

endmodule
