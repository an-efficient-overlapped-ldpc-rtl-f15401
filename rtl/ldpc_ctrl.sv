// ldpc_ctrl -- overlapped check/variable node update schedule.
//
// With the upper-dual-diagonal parity part, parity block column KB+j is
// connected only to block rows j-1 and j. Its variable node update may
// therefore start as soon as the check node update of block row j is done,
// while the check node updates of the later rows are still running. The
// information columns are connected to rows all over the matrix and are
// updated after the last row. One iteration is MB + KB + 1 steps:
//
//   step t = 0          : check row 0 alone
//   step t = 1 .. MB-1  : check row t  together with variable column KB+t-1
//   step t = MB         : variable column NB-1 (last parity column)
//   step t = MB+1 .. MB+KB : variable column t-MB-1 (information columns)
//
// For the 12 x 24 code this is 1 + 11 + 13 = 25 cycles per iteration against
// 12 + 24 = 36 for rows-then-columns. Each check row is finished (written at
// the clock edge) before any column that uses it is read, and every column
// finishes before the next iteration reads its rows, so the result is the
// same as a flooding sum-product schedule.
//
// Interface: start is sampled in IDLE; that cycle is the one-cycle
// initialisation (init_en) that copies the input buffer into the decoder.
// Then N_ITER iterations run; hd_we marks the variable updates of the last
// iteration and done pulses with the last step. Latency from the start cycle
// to the done cycle inclusive is 1 + N_ITER * (MB + KB + 1) cycles.
// n_cnu, n_vnu and n_overlap count the steps of the current decode with a
// check update, a variable update and both at once.
//
// The order of the check rows (top to bottom), the one-cycle initialisation
// and the fixed number of iterations (12) follow the published design; the step
// encoding and the counters are this design's choices.
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int N_ITER = 12
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  output logic     busy,
  output logic     init_en,
  output logic     cnu_we,
  output row_idx_t cnu_row,
  output logic     vnu_we,
  output col_idx_t vnu_col,
  output logic     hd_we,
  output logic     done,
  output logic [7:0]  iter,
  output logic [15:0] n_cnu,
  output logic [15:0] n_vnu,
  output logic [15:0] n_overlap
);

  localparam int STEPS = MB + KB + 1;
  localparam int TW    = $clog2(STEPS);

  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t        state;
  logic [TW-1:0] step;

  wire last_step = (step == TW'(STEPS - 1));
  wire last_iter = (iter == 8'(N_ITER - 1));

  assign busy    = (state == S_RUN);
  assign init_en = (state == S_IDLE) && start;

  always_comb begin
    cnu_we  = busy && (step < TW'(MB));
    cnu_row = row_idx_t'(step);
    vnu_we  = busy && (step != '0);
    if (step <= TW'(MB)) vnu_col = col_idx_t'(int'(step) + KB - 1);
    else                 vnu_col = col_idx_t'(int'(step) - MB - 1);
    hd_we   = vnu_we && last_iter;
    done    = busy && last_step && last_iter;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      step      <= '0;
      iter      <= '0;
      n_cnu     <= '0;
      n_vnu     <= '0;
      n_overlap <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state     <= S_RUN;
          step      <= '0;
          iter      <= '0;
          n_cnu     <= '0;
          n_vnu     <= '0;
          n_overlap <= '0;
        end
        S_RUN: begin
          n_cnu     <= n_cnu + 16'(cnu_we);
          n_vnu     <= n_vnu + 16'(vnu_we);
          n_overlap <= n_overlap + 16'(cnu_we && vnu_we);
          if (last_step) begin
            step <= '0;
            if (last_iter) state <= S_IDLE;
            else           iter  <= iter + 8'd1;
          end else begin
            step <= step + TW'(1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
