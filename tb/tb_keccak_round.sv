// tb_keccak_round -- checks the Keccak-f[1600] round against the reference model on
// random states and every round index, and the full 24-round permutation of the
// all-zero state against its published first lane (F1258F7940E1DDE7).
module tb_keccak_round;
  import frodo_pkg::*;
  import keccak_ref_pkg::*;

  int checks = 0, failures = 0;
  kstate_t    s_in, s_out;
  logic [4:0] ridx;
  ref_state_t ref_s;

  keccak_round dut (.state_i(s_in), .round_idx(ridx), .state_o(s_out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    bit ok = 1;
    for (int k = 0; k < 25; k++) if (s_out[k] !== ref_s[k % 5][k / 5]) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s round %0d", what, ridx);
    end
  endtask

  initial begin
    for (int t = 0; t < 48; t++) begin
      for (int k = 0; k < 25; k++) begin
        s_in[k] = {$urandom, $urandom};
        ref_s[k % 5][k / 5] = s_in[k];
      end
      ridx = 5'(t % 24);
      #1;
      ref_round(ref_s, t % 24);
      compare("random");
    end
    // full permutation of the zero state, one round at a time
    for (int k = 0; k < 25; k++) s_in[k] = '0;
    for (int r = 0; r < 24; r++) begin
      ridx = 5'(r);
      #1;
      s_in = s_out;
    end
    checks++;
    if (s_in[0] !== 64'hF1258F7940E1DDE7) begin
      failures++;
      $display("FAIL zero-state permutation lane0=%h", s_in[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
