// tb_da_rom: checks all 32 words of the eight DA ROMs. The expected words are
// computed here from the cosine definition of the 8-point DCT with real
// arithmetic (not from the Chen constants): each word is 2^14 times the sum
// of the selected exact coefficients, and must match within the rounding of
// four stored constants (+-2 LSB).
module tb_da_rom;
  import dct_pkg::*;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  mode_e     mode;
  logic [3:0] addr;
  rom_word_t data [N];

  for (genvar r = 0; r < N; r++) begin : g_rom
    da_rom #(.ROW(r)) dut (.mode(mode), .addr(addr), .data(data[r]));
  end

  function automatic real ck(int k);
    return (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  // exact coefficient of operand k in DA row r
  function automatic real exact(mode_e m, int r, int k);
    int j;
    j = r % 4;
    if (m == MODE_DCT) begin
      if (r < 4) return 0.5 * ck(2*j) * $cos((2*k + 1) * (2*j) * PI / 16.0);
      else       return 0.5 * $cos((2*k + 1) * (2*j + 1) * PI / 16.0);
    end else begin
      if (r < 4) return 0.5 * ck(2*k) * $cos((2*j + 1) * (2*k) * PI / 16.0);
      else       return 0.5 * $cos((2*j + 1) * (2*k + 1) * PI / 16.0);
    end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int a = 0; a < 16; a++) begin
        mode = mode_e'(m);
        addr = 4'(a);
        #1;
        for (int r = 0; r < N; r++) begin
          real s;
          s = 0.0;
          for (int k = 0; k < 4; k++) if (a[k]) s += exact(mode_e'(m), r, k);
          s = s * 16384.0;
          checks++;
          if ($itor(data[r]) - s > 2.0 || s - $itor(data[r]) > 2.0) begin
            failures++;
            $display("FAIL mode=%0d row=%0d addr=%0d got %0d exp %f", m, r, a, data[r], s);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
