// ldpc_pkg -- shared constants, types and tables of the overlapped LDPC decoder.
//
// The code is a quasi-cyclic LDPC code described by a 12 x 24 base matrix of
// shift values (-1 = all-zero L x L block, s >= 0 = identity cyclically shifted
// by s). The left 12 columns (H1, information part) carry the IEEE 802.16e
// (WiMAX/WiBro) rate-1/2 shifts for expansion factor 96; the right 12 columns
// (H2, parity part) are the upper-dual-diagonal structure built from unshifted
// identity blocks: block row r has identities in parity columns r and r+1, the
// last block row only in the last parity column. A smaller expansion factor L
// uses the 802.16e scaling floor(s * L / 96).
//
// The edge tables list every non-zero block ("edge") in row-major order with
// its block row, block column, base shift, its slot among the edges of its row
// (check node unit input) and its slot among the edges of its column (variable
// node unit input). All tables are computed from the base matrix by constant
// functions.
//
// Messages are 6-bit two's complement LLRs with 2 fractional bits, saturated to
// +/-31 (+/-7.75); a positive LLR means bit 0. The check node unit uses the
// sum-product rule with phi(x) = -ln(tanh(x/2)), tabulated by phi_q() as
// round(4 * phi(k/4)) saturated to 31 for a 5-bit magnitude k (phi(0) -> 31).
// The message format and the table are this design's choice.
package ldpc_pkg;

  // ---------------------------------------------------------------- code size
  localparam int MB    = 12;         // block rows (check node groups)
  localparam int NB    = 24;         // block columns (variable node groups)
  localparam int KB    = NB - MB;    // information block columns
  localparam int Z_MAX = 96;         // expansion factor the shifts are given for

  // ------------------------------------------------------------ message format
  localparam int W      = 6;                 // message width
  localparam int MAGW   = W - 1;             // magnitude width
  localparam int MSG_MAX = (1 << MAGW) - 1;  // 31

  typedef logic signed [W-1:0] msg_t;

  // ------------------------------------------------------------- base matrix
  // Information part H1 (802.16e rate 1/2, z = 96).
  localparam int H1 [MB][KB] = '{
    '{-1, 94, 73, -1, -1, -1, -1, -1, 55, 83, -1, -1},
    '{-1, 27, -1, -1, -1, 22, 79,  9, -1, -1, -1, 12},
    '{-1, -1, -1, 24, 22, 81, -1, 33, -1, -1, -1,  0},
    '{61, -1, 47, -1, -1, -1, -1, -1, 65, 25, -1, -1},
    '{-1, -1, 39, -1, -1, -1, 84, -1, -1, 41, 72, -1},
    '{-1, -1, -1, -1, 46, 40, -1, 82, -1, -1, -1, 79},
    '{-1, -1, 95, 53, -1, -1, -1, -1, -1, 14, 18, -1},
    '{-1, 11, 73, -1, -1, -1,  2, -1, -1, 47, -1, -1},
    '{12, -1, -1, -1, 83, 24, -1, 43, -1, -1, -1, 51},
    '{-1, -1, -1, -1, -1, 94, -1, 59, -1, -1, 70, 72},
    '{-1, -1,  7, 65, -1, -1, -1, -1, 39, 49, -1, -1},
    '{43, -1, -1, -1, -1, 66, -1, 41, -1, -1, -1, 26}
  };

  // Shift of block (r, c) for z = 96, -1 for a zero block.
  function automatic int base_shift(input int r, input int c);
    if (c < KB) return H1[r][c];
    if ((c - KB) == r || (c - KB) == r + 1) return 0;
    return -1;
  endfunction

  // Shift scaled to expansion factor l.
  function automatic int scaled_shift(input int s, input int l);
    return (s * l) / Z_MAX;
  endfunction

  function automatic int count_edges();
    int n = 0;
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < NB; c++)
        if (base_shift(r, c) >= 0) n++;
    return n;
  endfunction

  function automatic int row_degree(input int r);
    int n = 0;
    for (int c = 0; c < NB; c++) if (base_shift(r, c) >= 0) n++;
    return n;
  endfunction

  function automatic int col_degree(input int c);
    int n = 0;
    for (int r = 0; r < MB; r++) if (base_shift(r, c) >= 0) n++;
    return n;
  endfunction

  function automatic int max_row_degree();
    int m = 0;
    for (int r = 0; r < MB; r++) if (row_degree(r) > m) m = row_degree(r);
    return m;
  endfunction

  function automatic int max_col_degree();
    int m = 0;
    for (int c = 0; c < NB; c++) if (col_degree(c) > m) m = col_degree(c);
    return m;
  endfunction

  localparam int NE = count_edges();      // non-zero blocks (73)
  localparam int DC = max_row_degree();   // check node unit inputs (7)
  localparam int DV = max_col_degree();   // variable node unit inputs (6)

  localparam int RW  = $clog2(MB);        // block row index width
  localparam int CW  = $clog2(NB);        // block column index width
  localparam int SHW = $clog2(Z_MAX);     // base shift width
  localparam int SLW = 3;                 // slot index width (DC, DV <= 8)

  typedef logic [RW-1:0] row_idx_t;
  typedef logic [CW-1:0] col_idx_t;

  // Edge tables, packed so that every tool folds them to constants.
  function automatic logic [NE-1:0][RW-1:0] f_edge_row();
    logic [NE-1:0][RW-1:0] t = '0;
    int e = 0;
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < NB; c++)
        if (base_shift(r, c) >= 0) begin t[e] = RW'(r); e++; end
    return t;
  endfunction

  function automatic logic [NE-1:0][CW-1:0] f_edge_col();
    logic [NE-1:0][CW-1:0] t = '0;
    int e = 0;
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < NB; c++)
        if (base_shift(r, c) >= 0) begin t[e] = CW'(c); e++; end
    return t;
  endfunction

  function automatic logic [NE-1:0][SHW-1:0] f_edge_shift();
    logic [NE-1:0][SHW-1:0] t = '0;
    int e = 0;
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < NB; c++)
        if (base_shift(r, c) >= 0) begin t[e] = SHW'(base_shift(r, c)); e++; end
    return t;
  endfunction

  // Slot of each edge among the edges of its block row (left to right).
  function automatic logic [NE-1:0][SLW-1:0] f_edge_rslot();
    logic [NE-1:0][SLW-1:0] t = '0;
    int e = 0;
    for (int r = 0; r < MB; r++) begin
      int k = 0;
      for (int c = 0; c < NB; c++)
        if (base_shift(r, c) >= 0) begin t[e] = SLW'(k); k++; e++; end
    end
    return t;
  endfunction

  // Slot of each edge among the edges of its block column (top to bottom).
  function automatic logic [NE-1:0][SLW-1:0] f_edge_cslot();
    logic [NE-1:0][SLW-1:0] t = '0;
    int e = 0;
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < NB; c++)
        if (base_shift(r, c) >= 0) begin
          int k = 0;
          for (int rr = 0; rr < r; rr++) if (base_shift(rr, c) >= 0) k++;
          t[e] = SLW'(k);
          e++;
        end
    return t;
  endfunction

  localparam logic [NE-1:0][RW-1:0]  EDGE_ROW   = f_edge_row();
  localparam logic [NE-1:0][CW-1:0]  EDGE_COL   = f_edge_col();
  localparam logic [NE-1:0][SHW-1:0] EDGE_SHIFT = f_edge_shift();
  localparam logic [NE-1:0][SLW-1:0] EDGE_RSLOT = f_edge_rslot();
  localparam logic [NE-1:0][SLW-1:0] EDGE_CSLOT = f_edge_cslot();

  // ------------------------------------------------------------ arithmetic
  // Saturate a wider signed value to the message range [-31, 31].
  function automatic msg_t sat_msg(input logic signed [15:0] v);
    if (v > 16'sd31)  return msg_t'(MSG_MAX);
    if (v < -16'sd31) return msg_t'(-MSG_MAX);
    return msg_t'(v);
  endfunction

  // phi(x) = -ln(tanh(x/2)) on the 2-fractional-bit grid:
  // phi_q(k) = min(31, round(4 * phi(k / 4))), phi_q(0) = 31.
  function automatic logic [MAGW-1:0] phi_q(input logic [MAGW-1:0] k);
    case (k)
      5'd0:          return 5'd31;
      5'd1:          return 5'd8;
      5'd2:          return 5'd6;
      5'd3:          return 5'd4;
      5'd4:          return 5'd3;
      5'd5, 5'd6:    return 5'd2;
      5'd7, 5'd8, 5'd9, 5'd10, 5'd11: return 5'd1;
      default:       return 5'd0;
    endcase
  endfunction

endpackage
