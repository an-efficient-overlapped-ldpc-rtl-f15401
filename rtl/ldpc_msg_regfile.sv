// ldpc_msg_regfile -- edge message register file, channel LLR registers and
// decision register of the overlapped decoder.
//
// Every non-zero L x L block ("edge") of the parity check matrix owns L message
// registers, kept in variable-node order. Each register holds one message at a
// time: the variable-to-check message after a variable node update and the
// check-to-variable message after a check node update. This works because in
// every iteration each edge is first read and overwritten by its check node
// update and afterwards by its variable node update.
//
// Two independent read/write ports serve the overlapped schedule:
//  * check port: cnu_row selects a block row; cnu_rd returns, per row slot,
//    the messages rotated into check-node order (lane i of an edge with shift s
//    reads variable (i + s) mod L); with cnu_we the results cnu_wr are rotated
//    back and written at the clock edge.
//  * variable port: vnu_col selects a block column; vnu_rd returns its
//    messages per column slot in variable order plus the channel LLRs; with
//    vnu_we the results vnu_wr are written, and with hd_we the hard decisions
//    are stored into the decision register of that column.
// Both ports may be active in the same cycle as long as the row and the column
// share no edge (the schedule guarantees this; an assertion checks it).
// init_en loads the channel LLRs of a whole codeword in one cycle and sets
// every edge message to the channel LLR of its variable node (initialisation
// step). The rotations are fixed wiring, because the shift of every edge is a
// constant of the code.
//
// Reads are combinational, writes take effect at the rising clock edge. The
// published design names the register files as a block; the organisation is this
// design's choice. Messages and channel LLRs are not reset (they are always
// loaded by init_en before use); the decision register resets to 0.
module ldpc_msg_regfile
  import ldpc_pkg::*;
#(
  parameter int L = Z_MAX
) (
  input  logic     clk,
  input  logic     rst_n,
  // initialisation
  input  logic     init_en,
  input  msg_t     init_llr  [NB][L],
  // check node port
  input  row_idx_t cnu_row,
  input  logic     cnu_we,
  output logic     cnu_valid [DC],
  output msg_t     cnu_rd    [DC][L],
  input  msg_t     cnu_wr    [DC][L],
  // variable node port
  input  col_idx_t vnu_col,
  input  logic     vnu_we,
  input  logic     hd_we,
  output logic     vnu_valid [DV],
  output msg_t     vnu_rd    [DV][L],
  output msg_t     vnu_ch    [L],
  input  msg_t     vnu_wr    [DV][L],
  input  logic     vnu_hard  [L],
  // decisions
  output logic     hard_out  [NB][L]
);

  // Storage is kept in packed vectors so that it maps to plain flip-flops.
  typedef msg_t [L-1:0] lane_vec_t;
  lane_vec_t [NE-1:0] mem;      // edge messages, variable order
  lane_vec_t [NB-1:0] ch_mem;   // channel LLRs
  lane_vec_t [NE-1:0] rot;      // edge messages in check order
  logic [NB-1:0][L-1:0] hd_q;   // decisions

  for (genvar e = 0; e < NE; e++) begin : g_edge
    localparam int S    = scaled_shift(int'(EDGE_SHIFT[e]), L);
    localparam int R    = int'(EDGE_ROW[e]);
    localparam int C    = int'(EDGE_COL[e]);
    localparam int RS   = int'(EDGE_RSLOT[e]);
    localparam int CS   = int'(EDGE_CSLOT[e]);

    for (genvar i = 0; i < L; i++) begin : g_rot
      assign rot[e][i] = mem[e][(i + S) % L];
    end

    wire cnu_hit = cnu_we && (cnu_row == row_idx_t'(R));
    wire vnu_hit = vnu_we && (vnu_col == col_idx_t'(C));

    always_ff @(posedge clk) begin
      for (int j = 0; j < L; j++) begin
        if (init_en)      mem[e][j] <= init_llr[C][j];
        else if (cnu_hit) mem[e][j] <= cnu_wr[RS][(j + L - S) % L];
        else if (vnu_hit) mem[e][j] <= vnu_wr[CS][j];
      end
    end

    // The schedule must never update one edge from both ports at once.
    a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(cnu_hit && vnu_hit));
  end

  // Check port read: collect the edges of the selected row by slot.
  always_comb begin
    for (int k = 0; k < DC; k++) begin
      cnu_valid[k] = 1'b0;
      for (int i = 0; i < L; i++) cnu_rd[k][i] = '0;
    end
    for (int e = 0; e < NE; e++)
      if (EDGE_ROW[e] == cnu_row) begin
        cnu_valid[EDGE_RSLOT[e]] = 1'b1;
        for (int i = 0; i < L; i++) cnu_rd[EDGE_RSLOT[e]][i] = rot[e][i];
      end
  end

  // Variable port read: collect the edges of the selected column by slot.
  always_comb begin
    for (int k = 0; k < DV; k++) begin
      vnu_valid[k] = 1'b0;
      for (int j = 0; j < L; j++) vnu_rd[k][j] = '0;
    end
    for (int e = 0; e < NE; e++)
      if (EDGE_COL[e] == vnu_col) begin
        vnu_valid[EDGE_CSLOT[e]] = 1'b1;
        for (int j = 0; j < L; j++) vnu_rd[EDGE_CSLOT[e]][j] = mem[e][j];
      end
    for (int j = 0; j < L; j++) vnu_ch[j] = ch_mem[vnu_col][j];
  end

  always_ff @(posedge clk) begin
    if (init_en)
      for (int c = 0; c < NB; c++)
        for (int j = 0; j < L; j++) ch_mem[c][j] <= init_llr[c][j];
  end

  for (genvar c = 0; c < NB; c++) begin : g_dec
    wire we = hd_we && (vnu_col == col_idx_t'(c));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        hd_q[c] <= '0;
      end else if (we) begin
        for (int j = 0; j < L; j++) hd_q[c][j] <= vnu_hard[j];
      end
    end
    for (genvar j = 0; j < L; j++) begin : g_lane
      assign hard_out[c][j] = hd_q[c][j];
    end
  end

endmodule
