// tb_ldpc_decoder -- end-to-end test of the overlapped decoder.
//
// Encodes random information words, passes them through a quantised noisy
// channel and streams the LLRs into the decoder, loading each codeword while
// the previous one is still being decoded. Every result is compared bit by bit
// with the flooding reference decoder of ldpc_ref_pkg, and with the sent
// codeword for the frames whose noise is low enough. Also checked per decode:
// the number of busy cycles (N_ITER * 25), the one-cycle initialisation gap
// between back-to-back decodes, and the check / variable / overlapped step
// counts. Mechanisms counted (each must occur): overlapped check+variable
// steps, input loading during a decode, back-to-back decodes, input
// saturation of -32, and channel errors corrected.
// Runs at a reduced expansion factor (L = 24) with the full 12 iterations.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int L      = 24;
  localparam int NIT    = 12;
  localparam int NFRAME = 6;
  localparam int STEPS  = MB + KB + 1;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic        in_ready;
  msg_t        in_llr [L];
  logic        busy, out_valid;
  logic        hard_out [NB][L];
  logic [7:0]  iter;
  logic [15:0] n_cnu, n_vnu, n_overlap;

  int checks = 0, failures = 0;
  int cycle = 0;

  ldpc_decoder #(.L(L), .N_ITER(NIT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // Expected results, in frame order.
  bit_q_t exp_hard [$];
  bit_q_t exp_cw   [$];
  bit     exp_good [$];
  int     exp_raw  [$];

  // Mechanism counters.
  int m_overlap = 0, m_load_busy = 0, m_back2back = 0, m_sat = 0, m_corrected = 0;
  int frames_done = 0;

  // Frame settings: amplitude and noise range (LSBs of 0.25).
  int amp_tab   [NFRAME] = '{8, 8, 32, 8, 6, 8};
  int noise_tab [NFRAME] = '{0, 9, 0, 11, 16, 9};

  initial begin
    for (int j = 0; j < L; j++) in_llr[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NFRAME; f++) begin
      bit_q_t info, cw, hd;
      int_q_t llr;
      int raw;
      raw  = 0;
      info = new[KB * L];
      foreach (info[v]) info[v] = bit'($urandom_range(1, 0));
      cw  = encode(L, info);
      check(syndrome_weight(L, cw) == 0, "encoder output is a codeword");
      llr = channel(cw, amp_tab[f], noise_tab[f]);
      foreach (llr[v]) if ((llr[v] < 0) != cw[v]) raw++;
      foreach (llr[v]) if (llr[v] == -32) begin m_sat++; break; end
      hd = decode(L, NIT, llr);
      exp_hard.push_back(hd);
      exp_cw.push_back(cw);
      exp_good.push_back(noise_tab[f] <= 9);
      exp_raw.push_back(raw);
      // stream the frame, one block column per accepted beat
      for (int c = 0; c < NB; ) begin
        @(negedge clk);
        in_valid = 1'b1;
        for (int j = 0; j < L; j++) in_llr[j] = msg_t'(llr[c * L + j]);
        if (in_ready) begin
          if (busy) m_load_busy++;
          c++;
        end
      end
      @(negedge clk);
      in_valid = 1'b0;
    end
    wait (frames_done == NFRAME);
    repeat (5) @(posedge clk);
    check(m_overlap   > 0, "overlapped steps occurred");
    check(m_load_busy > 0, "input loaded during a decode");
    check(m_back2back > 0, "back-to-back decodes occurred");
    check(m_sat       > 0, "input saturation occurred");
    check(m_corrected > 0, "channel errors were corrected");
    $display("mechanisms: overlap_steps=%0d load_while_busy=%0d back_to_back=%0d saturated_frames=%0d corrected_frames=%0d",
             m_overlap, m_load_busy, m_back2back, m_sat, m_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Busy-period and gap measurement.
  int busy_len = 0, gap_len = 0;
  bit seen_decode = 1'b0;
  always @(posedge clk) if (rst_n) begin
    if (busy) begin
      if (busy_len == 0 && seen_decode) begin
        check(gap_len == 1, $sformatf("one idle (initialisation) cycle between decodes, got %0d", gap_len));
        if (gap_len == 1) m_back2back++;
      end
      busy_len <= busy_len + 1;
      gap_len  <= 0;
    end else begin
      if (busy_len != 0) begin
        check(busy_len == NIT * STEPS, $sformatf("decode takes %0d cycles, got %0d", NIT * STEPS, busy_len));
        seen_decode <= 1'b1;
      end
      busy_len <= 0;
      gap_len  <= gap_len + 1;
    end
  end

  // Result checker.
  always @(posedge clk) if (rst_n && out_valid) begin
    bit_q_t hd, cw;
    int     mism, err;
    bit     good;
    int     raw;
    mism = 0;
    err  = 0;
    hd   = exp_hard.pop_front();
    cw   = exp_cw.pop_front();
    good = exp_good.pop_front();
    raw  = exp_raw.pop_front();
    for (int c = 0; c < NB; c++)
      for (int j = 0; j < L; j++) begin
        if (hard_out[c][j] != hd[c * L + j]) mism++;
        if (hard_out[c][j] != cw[c * L + j]) err++;
      end
    check(mism == 0, $sformatf("frame %0d matches reference decoder (%0d bits differ)", frames_done, mism));
    if (good) check(err == 0, $sformatf("frame %0d decoded to sent codeword (%0d errors, %0d raw)", frames_done, err, raw));
    if (err == 0 && raw > 0) m_corrected++;
    check(n_cnu == 16'(NIT * MB), "check update steps per decode");
    check(n_vnu == 16'(NIT * NB), "variable update steps per decode");
    check(n_overlap == 16'(NIT * (MB - 1)), "overlapped steps per decode");
    m_overlap += int'(n_overlap);
    $display("frame %0d: raw errors %0d, residual errors %0d, reference mismatches %0d", frames_done, raw, err, mism);
    frames_done <= frames_done + 1;
  end

  // Watchdog.
  initial begin
    repeat (NFRAME * (NIT * STEPS + 60) + 500) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
