// ldpc_decoder -- overlapped quasi-cyclic LDPC decoder for an
// upper-dual-diagonal 12 x 24 base matrix (2304-bit codewords at L = 96).
//
// Structure: the input buffer (ldpc_init_buffer) collects the channel LLRs of
// one codeword; as soon as it is full and the decoder is idle, the controller
// (ldpc_ctrl) spends one cycle copying it into the message register file
// (ldpc_msg_regfile), which sets every edge message to its channel LLR. The
// controller then runs N_ITER sum-product iterations. In each cycle the check
// node block (ldpc_cnu_block, L lanes) updates one block row and, from the
// second row on, the variable node block (ldpc_vnu_block, L lanes) updates in
// the same cycle the parity block column whose two rows are already done; the
// information columns and the last parity column follow the last row. One
// iteration takes MB + KB + 1 = 25 cycles instead of 36.
//
// Interface: in_llr carries one block column of channel LLRs (6-bit, 2
// fractional bits, positive = bit 0) per in_valid && in_ready beat, columns
// 0..23 in order. out_valid pulses for one cycle, one cycle after the last
// update step, when a codeword is decoded;
// hard_out then holds the decisions for all NB*L code bits (column c, lane j
// is code bit c*L + j; columns 0..KB-1 are the information bits) and keeps
// them until the last iteration of the next codeword starts. The next
// codeword may be loaded while the current one is decoded. Latency from the
// initialisation cycle to out_valid inclusive is 2 + N_ITER*25 cycles.
// iter is the current iteration (0-based);
// n_cnu / n_vnu / n_overlap count, for the last decode, the cycles with a
// check update, a variable update and both at once.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int L      = Z_MAX,   // expansion factor = lanes
  parameter int N_ITER = 12       // decoding iterations
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  msg_t        in_llr   [L],
  output logic        busy,
  output logic        out_valid,
  output logic        hard_out [NB][L],
  output logic [7:0]  iter,
  output logic [15:0] n_cnu,
  output logic [15:0] n_vnu,
  output logic [15:0] n_overlap
);

  logic     buf_full, init_en, done;
  msg_t     buf_llr [NB][L];
  logic     cnu_we, vnu_we, hd_we;
  row_idx_t cnu_row;
  col_idx_t vnu_col;

  logic     cnu_valid [DC];
  msg_t     cnu_rd    [DC][L];
  msg_t     cnu_wr    [DC][L];
  logic     vnu_valid [DV];
  msg_t     vnu_rd    [DV][L];
  msg_t     vnu_ch    [L];
  msg_t     vnu_wr    [DV][L];
  logic     vnu_hard  [L];

  ldpc_init_buffer #(.L(L)) u_buf (
    .clk, .rst_n, .in_valid, .in_ready, .in_llr,
    .full(buf_full), .take(init_en), .buf_llr
  );

  ldpc_ctrl #(.N_ITER(N_ITER)) u_ctrl (
    .clk, .rst_n, .start(buf_full), .busy, .init_en,
    .cnu_we, .cnu_row, .vnu_we, .vnu_col, .hd_we, .done,
    .iter, .n_cnu, .n_vnu, .n_overlap
  );

  ldpc_msg_regfile #(.L(L)) u_rf (
    .clk, .rst_n, .init_en, .init_llr(buf_llr),
    .cnu_row, .cnu_we, .cnu_valid, .cnu_rd, .cnu_wr,
    .vnu_col, .vnu_we, .hd_we, .vnu_valid, .vnu_rd, .vnu_ch, .vnu_wr, .vnu_hard,
    .hard_out
  );

  ldpc_cnu_block #(.L(L)) u_cnu (
    .slot_valid(cnu_valid), .v2c(cnu_rd), .c2v(cnu_wr)
  );

  ldpc_vnu_block #(.L(L)) u_vnu (
    .ch(vnu_ch), .slot_valid(vnu_valid), .c2v(vnu_rd), .v2c(vnu_wr), .hard(vnu_hard)
  );

  // The last decisions are written at the clock edge that ends the done
  // cycle, so the result is announced one cycle later.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= done;
  end

endmodule
