// tb_ldpc_vnu_block -- random test of the variable node block.
//
// Drives random channel LLRs, check-to-variable messages and slot-use masks
// into a 4-lane block and compares with the rule evaluated here: total =
// channel + sum of used messages; each used slot gets total minus its own
// message clipped to [-31, 31]; unused slots get 0; the decision is 1 when the
// total is negative. Large inputs are forced often so that saturation occurs.
module tb_ldpc_vnu_block;
  import ldpc_pkg::*;

  localparam int L = 4;
  localparam int NVEC = 3000;

  msg_t ch [L];
  logic slot_valid [DV];
  msg_t c2v [DV][L];
  msg_t v2c [DV][L];
  logic hard [L];

  int checks = 0, failures = 0, n_sat = 0;

  ldpc_vnu_block #(.L(L)) dut (.*);

  function automatic int rnd_msg();
    case ($urandom_range(5, 0))
      0: return 31;
      1: return -31;
      default: return int'($urandom_range(62, 0)) - 31;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < NVEC; n++) begin
      for (int i = 0; i < L; i++) ch[i] = msg_t'(rnd_msg());
      for (int k = 0; k < DV; k++) begin
        slot_valid[k] = ($urandom_range(2, 0) != 0);
        for (int i = 0; i < L; i++) c2v[k][i] = msg_t'(rnd_msg());
      end
      #1;
      for (int i = 0; i < L; i++) begin
        int tot;
        tot = int'(ch[i]);
        for (int k = 0; k < DV; k++) if (slot_valid[k]) tot += int'(c2v[k][i]);
        checks++;
        if (hard[i] != (tot < 0)) begin
          failures++;
          $display("FAIL vec %0d lane %0d decision", n, i);
        end
        for (int k = 0; k < DV; k++) begin
          int e;
          e = tot - int'(c2v[k][i]);
          if (e > 31 || e < -31) n_sat++;
          if (e > 31) e = 31;
          if (e < -31) e = -31;
          if (!slot_valid[k]) e = 0;
          checks++;
          if (int'(v2c[k][i]) != e) begin
            failures++;
            if (failures < 10) $display("FAIL vec %0d lane %0d slot %0d: got %0d expected %0d",
                                        n, i, k, v2c[k][i], e);
          end
        end
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(NVEC * 10 + 1000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
