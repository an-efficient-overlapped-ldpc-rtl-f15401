// tb_ldpc_cnu_block -- random test of the check node block.
//
// Drives random messages and random slot-use masks into a 4-lane block and
// compares every output with the sum-product rule evaluated here: for each
// used slot, sign = XOR of the other signs, magnitude = phi(min(31, sum of
// phi(|other inputs|))), with phi computed in real arithmetic by
// ldpc_ref_pkg::ref_phi. Unused slots must output 0. Edge values -31, 0 and
// 31 are forced often.
module tb_ldpc_cnu_block;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int L = 4;
  localparam int NVEC = 3000;

  logic slot_valid [DC];
  msg_t v2c [DC][L];
  msg_t c2v [DC][L];

  int checks = 0, failures = 0;

  ldpc_cnu_block #(.L(L)) dut (.*);

  function automatic int rnd_msg();
    case ($urandom_range(7, 0))
      0: return 31;
      1: return -31;
      2: return 0;
      default: return int'($urandom_range(62, 0)) - 31;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < NVEC; n++) begin
      for (int k = 0; k < DC; k++) begin
        slot_valid[k] = ($urandom_range(3, 0) != 0);
        for (int i = 0; i < L; i++) v2c[k][i] = msg_t'(rnd_msg());
      end
      #1;
      for (int i = 0; i < L; i++)
        for (int k = 0; k < DC; k++) begin
          int s, expv, sg;
          s = 0; sg = 0;
          for (int j = 0; j < DC; j++)
            if (j != k && slot_valid[j]) begin
              int q;
              q   = int'(v2c[j][i]);
              s  += ref_phi(q < 0 ? -q : q);
              sg ^= (q < 0);
            end
          expv = ref_phi(s > 31 ? 31 : s);
          if (sg) expv = -expv;
          if (!slot_valid[k]) expv = 0;
          checks++;
          if (int'(c2v[k][i]) != expv) begin
            failures++;
            if (failures < 10) $display("FAIL vec %0d lane %0d slot %0d: got %0d expected %0d",
                                        n, i, k, c2v[k][i], expv);
          end
        end
    end
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
