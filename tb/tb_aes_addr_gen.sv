// tb_aes_addr_gen: sweeps every controller state, round, byte and
// MixColumns counter value and checks both RAM addresses against the AES
// definitions: ShiftRows source column (c + r) mod 4, MixColumns matrix
// coefficient of each accumulated row (1,1,2,3 in counter order, all four rows
// of the column used once), key-schedule taps k13,k14,k15,k12 and k_{j-4},
// round constant RC[i] at word 15+i, and the half-swapping of the state RAM.
module tb_aes_addr_gen;
  import aes_pkg::*;

  ctrl_state_e state = S_IDLE;
  logic [3:0] round = '0, byte_idx = '0;
  logic [1:0] mc = '0;
  logic [4:0] state_addr, key_addr;
  int checks = 0, failures = 0;

  aes_addr_gen dut (.state, .round, .byte_idx, .mc, .state_addr, .key_addr);

  // MixColumns matrix, M[row][input row]
  int mcm [4][4] = '{'{2, 3, 1, 1}, '{1, 2, 3, 1}, '{1, 1, 2, 3}, '{3, 1, 1, 2}};
  int coef [4] = '{1, 1, 2, 3};   // coefficient of the ALU op used at counter m
  int tap [4] = '{13, 14, 15, 12};

  task automatic expect_eq(input string what, input logic [4:0] got, input logic [4:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s state=%s round=%0d byte=%0d mc=%0d: %0d expected %0d",
               what, state.name(), round, byte_idx, mc, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rnd = 0; rnd <= 10; rnd++)
      for (int b = 0; b < 16; b++) begin
        int r, c;
        logic [1:0] rd_half;
        r = b % 4;
        c = b / 4;
        rd_half = 2'(rnd % 2 == 0);
        round = 4'(rnd); byte_idx = 4'(b);
        // last round: ShiftRows source
        state = S_LR_SUB; mc = 0; #1;
        expect_eq("LR state", state_addr, 5'(16 * rd_half[0] + 4 * ((c + r) % 4) + r));
        expect_eq("LR key", key_addr, 5'(b));
        // MixColumns inputs
        begin
          bit seen [4];
          seen = '{0, 0, 0, 0};
          for (int m = 0; m < 4; m++) begin
            int j;
            state = S_MC_IN; mc = 2'(m); #1;
            j = int'(state_addr[1:0]);
            expect_eq("MC half", 5'(state_addr[4]), 5'(rd_half[0]));
            expect_eq("MC column", 5'(state_addr[3:2]), 5'((c + j) % 4));
            checks++;
            if (mcm[r][j] != coef[m] || seen[j]) begin
              failures++;
              $display("FAIL MC order: out row %0d, m=%0d reads row %0d", r, m, j);
            end
            seen[j] = 1;
          end
        end
        mc = 0;
        state = S_MC_KEY; #1; expect_eq("MC key", key_addr, 5'(b));
        foreach (state_wr_states[i]) begin
          state = state_wr_states[i]; #1;
          expect_eq("write", state_addr, 5'(16 * (rnd % 2) + b));
        end
        state = S_KS_SET; #1; expect_eq("KS set", key_addr, 5'(b));
        state = S_KS_WR;  #1; expect_eq("KS write", key_addr, 5'(b));
        state = S_LD_PT;  #1; expect_eq("LD key write", key_addr, 5'(b));
        if (b < 4) begin
          state = S_KS_SBOX; #1; expect_eq("KS S-box tap", key_addr, 5'(tap[b]));
        end else begin
          state = S_KS_XOR;  #1; expect_eq("KS xor tap", key_addr, 5'(b - 4));
        end
        if (rnd >= 1) begin
          state = S_KS_RC; #1; expect_eq("KS RC", key_addr, 5'(15 + rnd));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ctrl_state_e state_wr_states [3] = '{S_LD_WR, S_MC_WR, S_LR_WR};
endmodule
