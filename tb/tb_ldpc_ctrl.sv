// tb_ldpc_ctrl -- schedule test of the overlapped controller.
//
// Runs two decodes of 3 iterations and checks the schedule against the data
// dependencies of the code rather than against a fixed table: a block column
// may be updated only after every block row it belongs to was updated earlier
// in the same iteration (never in the same cycle), and a row only after every
// column in it was updated in the previous iteration. Each row and each column
// must be updated exactly once per iteration, rows in order 0..11. Also
// checked: 25 cycles per iteration, 11 overlapped cycles per iteration, the
// done pulse 1 + 3 * 25 cycles after the start cycle (inclusive), hd_we only
// in the last iteration, init_en only for a start while idle, and the step
// counters.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;

  localparam int NIT = 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, init_en, cnu_we, vnu_we, hd_we, done;
  row_idx_t cnu_row;
  col_idx_t vnu_col;
  logic [7:0]  iter;
  logic [15:0] n_cnu, n_vnu, n_overlap;

  int checks = 0, failures = 0;

  ldpc_ctrl #(.N_ITER(NIT)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  int row_cnt [MB];
  int col_cnt [NB];
  int row_it  [MB];   // iteration in which the row was last updated
  int col_it  [NB];
  int cur_it, cyc_in_it, ovl_in_it, last_row, n_done, lat;
  bit counting;

  task automatic new_iteration();
    for (int r = 0; r < MB; r++) row_cnt[r] = 0;
    for (int c = 0; c < NB; c++) col_cnt[c] = 0;
    cyc_in_it = 0;
    ovl_in_it = 0;
    last_row  = -1;
  endtask

  initial begin
    n_done = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int d = 0; d < 2; d++) begin
      @(negedge clk);
      start = 1'b1;
      #1;
      check(init_en, "init_en with start while idle");
      for (int r = 0; r < MB; r++) row_it[r] = -1;
      for (int c = 0; c < NB; c++) col_it[c] = -1;
      cur_it = 0;
      new_iteration();
      lat = 1;
      @(negedge clk);
      // keep start high during the decode: it must be ignored while busy
      while (!done) begin
        check(!init_en, "no init_en while busy");
        lat++;
        @(negedge clk);
      end
      start = 1'b0;
      lat++;
      check(lat == 1 + NIT * (MB + KB + 1), $sformatf("latency %0d", lat));
      @(negedge clk);
      check(n_cnu == 16'(NIT * MB) && n_vnu == 16'(NIT * NB) && n_overlap == 16'(NIT * (MB - 1)),
            $sformatf("counters %0d %0d %0d", n_cnu, n_vnu, n_overlap));
      check(!busy, "idle after done");
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Dependency checker, sampled in the middle of each cycle.
  always @(negedge clk) if (rst_n && busy) begin
    check(int'(iter) == cur_it, "iteration number");
    check(hd_we == (vnu_we && cur_it == NIT - 1), "hd_we only in the last iteration");
    if (cnu_we) begin
      int r;
      r = int'(cnu_row);
      check(r > last_row, "rows in increasing order");
      last_row = r;
      row_cnt[r]++;
      for (int c = 0; c < NB; c++)
        if (base_shift(r, c) >= 0)
          check(col_it[c] == cur_it - 1, $sformatf("row %0d before column %0d of previous iteration", r, c));
    end
    if (vnu_we) begin
      int c;
      c = int'(vnu_col);
      col_cnt[c]++;
      for (int r = 0; r < MB; r++)
        if (base_shift(r, c) >= 0)
          check(row_it[r] == cur_it && !(cnu_we && int'(cnu_row) == r),
                $sformatf("column %0d after row %0d", c, r));
    end
    if (cnu_we && vnu_we) ovl_in_it++;
    // commit this cycle's updates
    if (cnu_we) row_it[int'(cnu_row)] = cur_it;
    if (vnu_we) col_it[int'(vnu_col)] = cur_it;
    cyc_in_it++;
    if (cyc_in_it == MB + KB + 1) begin
      for (int r = 0; r < MB; r++) check(row_cnt[r] == 1, $sformatf("row %0d once", r));
      for (int c = 0; c < NB; c++) check(col_cnt[c] == 1, $sformatf("column %0d once", c));
      check(ovl_in_it == MB - 1, $sformatf("overlapped cycles %0d", ovl_in_it));
      check((cur_it == NIT - 1) == done, "done at the last step of the last iteration");
      cur_it++;
      new_iteration();
    end else begin
      check(!done, "no early done");
    end
  end

  initial begin
    repeat (400) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
