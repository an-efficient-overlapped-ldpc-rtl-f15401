// tb_ldpc_decoder_full -- one complete decode at the default size.
//
// The decoder runs with its default parameters: expansion factor 96
// (2304-bit codewords, rate 1/2) and 12 iterations. One random codeword is
// sent over a noisy channel with correctable errors. Checked: the decisions
// equal the flooding reference decoder bit for bit and equal the sent
// codeword; the decode takes 12 * 25 = 300 busy cycles and the result
// appears 302 cycles after the initialisation cycle (counted inclusively);
// 132 of the steps overlap a check and a variable update.
module tb_ldpc_decoder_full;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int L   = Z_MAX;
  localparam int NIT = 12;

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

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    bit_q_t info, cw, hd;
    int_q_t llr;
    int raw, err, mism, busy_cycles, lat;
    raw = 0; err = 0; mism = 0; busy_cycles = 0; lat = 0;
    for (int j = 0; j < L; j++) in_llr[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    info = new[KB * L];
    foreach (info[v]) info[v] = bit'($urandom_range(1, 0));
    cw = encode(L, info);
    check(syndrome_weight(L, cw) == 0, "encoder output is a codeword");
    llr = channel(cw, 8, 9);
    foreach (llr[v]) if ((llr[v] < 0) != cw[v]) raw++;
    hd = decode(L, NIT, llr);
    for (int c = 0; c < NB; ) begin
      @(negedge clk);
      in_valid = 1'b1;
      for (int j = 0; j < L; j++) in_llr[j] = msg_t'(llr[c * L + j]);
      if (in_ready) c++;
    end
    // the cycle after the last beat is the initialisation cycle
    @(negedge clk);
    in_valid = 1'b0;
    lat = 1;
    while (!out_valid) begin
      @(negedge clk);
      lat++;
      if (busy) busy_cycles++;
    end
    for (int c = 0; c < NB; c++)
      for (int j = 0; j < L; j++) begin
        if (hard_out[c][j] != hd[c * L + j]) mism++;
        if (hard_out[c][j] != cw[c * L + j]) err++;
      end
    check(mism == 0, $sformatf("matches reference decoder (%0d bits differ)", mism));
    check(err == 0, $sformatf("decoded to the sent codeword (%0d errors, %0d raw)", err, raw));
    check(raw > 0, "channel produced errors to correct");
    check(busy_cycles == NIT * (MB + KB + 1), $sformatf("busy cycles %0d", busy_cycles));
    check(lat == 2 + NIT * (MB + KB + 1), $sformatf("latency %0d", lat));
    check(n_overlap == 16'(NIT * (MB - 1)), "overlapped steps");
    $display("raw errors %0d, residual %0d, latency %0d cycles, busy %0d, overlapped steps %0d",
             raw, err, lat, busy_cycles, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
