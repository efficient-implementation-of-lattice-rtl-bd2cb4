// tb_ks_postprocess: the code-based mapper.
//  1. The instruction codes of the first nine sub-polynomials (R_1..R_9 of
//     the first group) on acc_0..acc_15 must equal the printed mapping table
//     of the KaratSaber design (written out below from that table).
//  2. For random products and random sub-polynomials, every delta must be the
//     signed combination of R_L and R_H its code names, mod 2^13.
//  3. With in_valid low every delta is zero.
// Combinational unit, so no cycle count applies.
module tb_ks_postprocess;
  import ks_pkg::*;
  logic in_valid;
  prod_t prod;
  logic [6:0] sub;
  subpoly_t delta [NACC];
  map_code_t codes [NACC];
  int checks = 0, failures = 0;

  ks_postprocess dut (.*);

  // printed table, rows R_1..R_9, columns acc_0..acc_15
  int unsigned table_rows [9][16] = '{
    '{7, 6, 8, 7, 6, 7, 5, 6, 8, 7, 5, 6, 7, 6, 8, 7},
    '{7, 6, 7, 5, 6, 7, 6, 8, 7, 5, 6, 8, 7, 6, 7, 5},
    '{2, 1, 2, 3, 4, 3, 4, 1, 2, 3, 4, 1, 2, 1, 2, 3},
    '{8, 7, 6, 7, 5, 6, 7, 6, 8, 7, 5, 6, 8, 7, 6, 7},
    '{7, 5, 6, 7, 6, 8, 7, 6, 7, 5, 6, 8, 7, 5, 6, 7},
    '{2, 3, 4, 3, 4, 1, 2, 1, 2, 3, 4, 1, 2, 3, 4, 3},
    '{2, 0, 1, 6, 4, 0, 3, 7, 2, 0, 3, 7, 2, 0, 1, 6},
    '{6, 4, 0, 3, 7, 2, 0, 1, 6, 4, 0, 1, 6, 4, 0, 3},
    '{4, 0, 0, 1, 2, 0, 0, 3, 4, 0, 0, 3, 4, 0, 0, 1}
  };

  function automatic int coef_of(map_code_t c, bit high);
    case (c)
      C_PL:    return high ? 0 : 1;
      C_PH:    return high ? 1 : 0;
      C_ML:    return high ? 0 : -1;
      C_MH:    return high ? -1 : 0;
      C_PH_PL: return 1;
      C_PH_ML: return high ? 1 : -1;
      C_MH_PL: return high ? -1 : 1;
      C_MH_ML: return -1;
      default: return 0;
    endcase
  endfunction

  initial begin
    in_valid = 1; prod = '0;
    for (int k = 0; k < 9; k++) begin
      sub = 7'(k);
      #1;
      for (int t = 0; t < 16; t++) begin
        checks++;
        if (int'(codes[t]) != int'(table_rows[k][t])) begin
          failures++;
          $display("FAIL code R%0d acc_%0d = %0d, table %0d", k + 1, t, codes[t], table_rows[k][t]);
        end
      end
    end
    for (int n = 0; n < 400; n++) begin
      in_valid = ($urandom_range(7) != 0);
      sub = 7'($urandom_range(80));
      for (int i = 0; i < 32; i++) prod[i] = (i == 31) ? '0 : coef_t'($urandom_range(8191));
      #1;
      for (int t = 0; t < 16; t++)
        for (int i = 0; i < 16; i++) begin
          longint e;
          e = in_valid ? longint'(coef_of(codes[t], 0)) * prod[i] + longint'(coef_of(codes[t], 1)) * prod[16+i] : 0;
          checks++;
          if (delta[t][i] !== coef_t'(e & 64'h1FFF)) begin
            failures++;
            if (failures < 10) $display("FAIL delta sub %0d acc %0d coef %0d", sub, t, i);
          end
        end
      checks++;
      if (!in_valid) for (int t = 0; t < 16; t++) if (codes[t] != C_NOP) begin failures++; break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
