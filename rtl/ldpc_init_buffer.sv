// ldpc_init_buffer -- input buffer that lets the decoder initialise in one cycle.
//
// Channel LLRs of the next codeword arrive one block column (L values) per
// accepted beat, columns 0 .. NB-1 in order, with a valid/ready handshake
// (a beat is taken when in_valid && in_ready). After NB beats the buffer is
// full and stops accepting. While full, the decoder may take the whole
// codeword at once (take, one cycle); the buffer is then empty again and can
// fill with the following codeword while the current one is decoded. Values
// of -32 are saturated to -31 so that all messages are symmetric.
//
// The published design initialises in one clock cycle thanks to
// buffers; the column-wide input port, the handshake and the saturation are
// this design's choices. take while not full is ignored.
module ldpc_init_buffer
  import ldpc_pkg::*;
#(
  parameter int L = Z_MAX
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  msg_t in_llr  [L],
  output logic full,
  input  logic take,
  output msg_t buf_llr [NB][L]
);

  col_idx_t wr_col;

  assign in_ready = !full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_col <= '0;
      full   <= 1'b0;
    end else if (full) begin
      if (take) full <= 1'b0;
    end else if (in_valid) begin
      if (wr_col == col_idx_t'(NB - 1)) begin
        wr_col <= '0;
        full   <= 1'b1;
      end else begin
        wr_col <= wr_col + col_idx_t'(1);
      end
    end
  end

  // Storage is a packed vector (plain flip-flops); one write enable per
  // block column.
  typedef msg_t [L-1:0] lane_vec_t;
  lane_vec_t [NB-1:0] buf_q;

  for (genvar c = 0; c < NB; c++) begin : g_col
    wire we = in_valid && in_ready && (wr_col == col_idx_t'(c));
    always_ff @(posedge clk) begin
      if (we)
        for (int j = 0; j < L; j++)
          buf_q[c][j] <= (in_llr[j] == msg_t'(-32)) ? msg_t'(-MSG_MAX) : in_llr[j];
    end
    for (genvar j = 0; j < L; j++) begin : g_lane
      assign buf_llr[c][j] = buf_q[c][j];
    end
  end

  a_take_when_full: assert property (@(posedge clk) disable iff (!rst_n) take |-> full);

endmodule
