// tb_ldpc_init_buffer -- test of the input buffer.
//
// Streams three codewords of random LLRs (including -32) into a 4-lane buffer
// with random gaps in in_valid. Checks that in_ready drops exactly after 24
// accepted beats, that beats offered while full are not taken, that the
// buffer contents equal the sent values with -32 turned into -31, and that a
// take empties the buffer in one cycle.
module tb_ldpc_init_buffer;
  import ldpc_pkg::*;

  localparam int L = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, full, take = 1'b0;
  msg_t in_llr  [L];
  msg_t buf_llr [NB][L];

  int checks = 0, failures = 0, n_sat = 0;

  ldpc_init_buffer #(.L(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int sent [NB][L];
    for (int j = 0; j < L; j++) in_llr[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 3; f++) begin
      for (int c = 0; c < NB; ) begin
        @(negedge clk);
        check(in_ready && !full, "ready while filling");
        in_valid = ($urandom_range(3, 0) != 0);
        for (int j = 0; j < L; j++) begin
          sent[c][j] = ($urandom_range(9, 0) == 0) ? -32 : int'($urandom_range(62, 0)) - 31;
          in_llr[j] = msg_t'(sent[c][j]);
          if (in_valid && sent[c][j] == -32) n_sat++;
        end
        if (in_valid) c++;
      end
      // offer a stray beat while full: it must not be taken
      @(negedge clk);
      check(full && !in_ready, "full after 24 beats");
      in_valid = 1'b1;
      for (int j = 0; j < L; j++) in_llr[j] = msg_t'(5);
      repeat (2) @(negedge clk);
      in_valid = 1'b0;
      check(full, "still full");
      for (int c = 0; c < NB; c++)
        for (int j = 0; j < L; j++)
          check(int'(buf_llr[c][j]) == (sent[c][j] == -32 ? -31 : sent[c][j]),
                $sformatf("frame %0d column %0d lane %0d", f, c, j));
      take = 1'b1;
      @(negedge clk);
      take = 1'b0;
      check(!full && in_ready, "empty one cycle after take");
    end
    check(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
