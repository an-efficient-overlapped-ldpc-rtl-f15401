// tb_ldpc_msg_regfile -- test of the edge message register file.
//
// Keeps its own model of the expanded matrix: model[r][c][v] is the message
// on the one in block (r, c) at variable v of that block column, with block
// row check i connected to variable (i + s) mod L, s = floor(shift * L / 96).
// Sequence (8 lanes): initialise with random channel LLRs; read every row
// through the check port; write every row; read and write every column through
// the variable port, with decisions; read every row again; finally write a row
// and a disjoint column in the same cycle. Every read is compared with the
// model, including the slot-valid masks and zero fill of unused slots.
module tb_ldpc_msg_regfile;
  import ldpc_pkg::*;

  localparam int L = 8;

  logic     clk = 1'b0, rst_n = 1'b0;
  logic     init_en = 1'b0;
  msg_t     init_llr [NB][L];
  row_idx_t cnu_row = '0;
  logic     cnu_we = 1'b0;
  logic     cnu_valid [DC];
  msg_t     cnu_rd [DC][L];
  msg_t     cnu_wr [DC][L];
  col_idx_t vnu_col = '0;
  logic     vnu_we = 1'b0, hd_we = 1'b0;
  logic     vnu_valid [DV];
  msg_t     vnu_rd [DV][L];
  msg_t     vnu_ch [L];
  msg_t     vnu_wr [DV][L];
  logic     vnu_hard [L];
  logic     hard_out [NB][L];

  int checks = 0, failures = 0;
  int model [MB][NB][L];
  int llr [NB][L];
  bit hexp [NB][L];

  ldpc_msg_regfile #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int sh(input int r, input int c);
    return (base_shift(r, c) * L) / 96;
  endfunction

  function automatic int rnd();
    return int'($urandom_range(62, 0)) - 31;
  endfunction

  task automatic check_row(input int r);
    int k;
    cnu_row = row_idx_t'(r);
    #1;
    k = 0;
    for (int c = 0; c < NB; c++)
      if (base_shift(r, c) >= 0) begin
        check(cnu_valid[k], $sformatf("row %0d slot %0d valid", r, k));
        for (int i = 0; i < L; i++)
          check(int'(cnu_rd[k][i]) == model[r][c][(i + sh(r, c)) % L],
                $sformatf("row %0d slot %0d lane %0d read", r, k, i));
        k++;
      end
    for (; k < DC; k++) begin
      check(!cnu_valid[k], "unused row slot invalid");
      for (int i = 0; i < L; i++) check(cnu_rd[k][i] == '0, "unused row slot zero");
    end
  endtask

  task automatic check_col(input int c);
    int k;
    vnu_col = col_idx_t'(c);
    #1;
    k = 0;
    for (int r = 0; r < MB; r++)
      if (base_shift(r, c) >= 0) begin
        check(vnu_valid[k], $sformatf("column %0d slot %0d valid", c, k));
        for (int j = 0; j < L; j++)
          check(int'(vnu_rd[k][j]) == model[r][c][j], $sformatf("column %0d slot %0d lane %0d read", c, k, j));
        k++;
      end
    for (; k < DV; k++) check(!vnu_valid[k], "unused column slot invalid");
    for (int j = 0; j < L; j++) check(int'(vnu_ch[j]) == llr[c][j], "channel LLR read");
  endtask

  // Prepare a random check-port write of row r and update the model.
  task automatic prep_row_write(input int r);
    int k = 0;
    for (int kk = 0; kk < DC; kk++)
      for (int i = 0; i < L; i++) cnu_wr[kk][i] = msg_t'(rnd());
    for (int c = 0; c < NB; c++)
      if (base_shift(r, c) >= 0) begin
        for (int i = 0; i < L; i++) model[r][c][(i + sh(r, c)) % L] = int'(cnu_wr[k][i]);
        k++;
      end
    cnu_row = row_idx_t'(r);
  endtask

  task automatic prep_col_write(input int c);
    int k = 0;
    for (int kk = 0; kk < DV; kk++)
      for (int j = 0; j < L; j++) vnu_wr[kk][j] = msg_t'(rnd());
    for (int j = 0; j < L; j++) begin
      vnu_hard[j] = bit'($urandom_range(1, 0));
      hexp[c][j] = vnu_hard[j];
    end
    for (int r = 0; r < MB; r++)
      if (base_shift(r, c) >= 0) begin
        for (int j = 0; j < L; j++) model[r][c][j] = int'(vnu_wr[k][j]);
        k++;
      end
    vnu_col = col_idx_t'(c);
  endtask

  initial begin
    for (int c = 0; c < NB; c++)
      for (int j = 0; j < L; j++) begin
        llr[c][j] = rnd();
        init_llr[c][j] = msg_t'(llr[c][j]);
        hexp[c][j] = 1'b0;
        for (int r = 0; r < MB; r++) model[r][c][j] = llr[c][j];
      end
    for (int j = 0; j < L; j++) vnu_hard[j] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // decision register is cleared by reset
    for (int c = 0; c < NB; c++)
      for (int j = 0; j < L; j++) check(hard_out[c][j] == 1'b0, "decision reset");
    init_en = 1'b1;
    @(negedge clk);
    init_en = 1'b0;
    for (int r = 0; r < MB; r++) check_row(r);
    for (int r = 0; r < MB; r++) begin
      prep_row_write(r);
      cnu_we = 1'b1;
      @(negedge clk);
      cnu_we = 1'b0;
    end
    for (int r = 0; r < MB; r++) check_row(r);
    for (int c = 0; c < NB; c++) begin
      check_col(c);
      prep_col_write(c);
      vnu_we = 1'b1;
      hd_we  = 1'b1;
      @(negedge clk);
      vnu_we = 1'b0;
      hd_we  = 1'b0;
    end
    for (int c = 0; c < NB; c++)
      for (int j = 0; j < L; j++) check(hard_out[c][j] == hexp[c][j], "decision written");
    for (int r = 0; r < MB; r++) check_row(r);
    // simultaneous row and disjoint column write (row 5, parity column 3)
    prep_row_write(5);
    prep_col_write(KB + 3);
    cnu_we = 1'b1;
    vnu_we = 1'b1;
    @(negedge clk);
    cnu_we = 1'b0;
    vnu_we = 1'b0;
    check_row(5);
    check_col(KB + 3);
    for (int c = 0; c < NB; c++) check_col(c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
