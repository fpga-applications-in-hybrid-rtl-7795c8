// tb_svpwm: checks the sector-based duty calculation against min-max
// zero-sequence injection computed in floating point:
// d_x = T*(1/2 + v_x - (max(v)+min(v))/2), clipped to 0..T and to the
// modulation limits. Sweeps the voltage angle over all six sectors at several
// magnitudes, including overmodulation, and checks the sector number.
// The sector numbering and 0..1000 range follow the document; the duty
// limits 20..980 are this design's choice.
module tb_svpwm;
  import foc_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  q15_t va = '0, vb = '0;
  logic [2:0] sector;
  logic [15:0] duty [3];
  int checks = 0, failures = 0;
  int sect_seen [8];

  always #5 clk = ~clk;

  svpwm dut (.clk, .rst, .in_valid, .v_alpha(va), .v_beta(vb), .out_valid, .sector, .duty);

  function automatic real clip(real v, real lo, real hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  initial begin
    real mag, ang, a, b, ph [3], mx, mn, d, err;
    int exp_sector;
    repeat (2) @(posedge clk);
    rst = 0;
    foreach (sect_seen[i]) sect_seen[i] = 0;
    for (int m = 0; m < 5; m++) begin
      mag = 0.1 + 0.12 * m;          // 0.58 > 1/sqrt3: overmodulation
      for (int s = 0; s < 72; s++) begin
        ang = (s + 0.37) * 6.283185307179586 / 72.0;
        a = mag * $cos(ang); b = mag * $sin(ang);
        @(negedge clk);
        va = 16'($rtoi(a * 32768.0)); vb = 16'($rtoi(b * 32768.0));
        in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        a = real'(va) / 32768.0; b = real'(vb) / 32768.0;
        ph[0] = a; ph[1] = -a/2 + 0.8660254 * b; ph[2] = -a/2 - 0.8660254 * b;
        mx = ph[0]; mn = ph[0];
        for (int k = 1; k < 3; k++) begin
          if (ph[k] > mx) mx = ph[k];
          if (ph[k] < mn) mn = ph[k];
        end
        for (int k = 0; k < 3; k++) begin
          d = 1000.0 * (0.5 + ph[k] - (mx + mn) / 2.0);
          d = clip(clip(d, 0, 1000), 20, 980);
          err = real'(duty[k]) - d;
          checks++;
          if (err > 2.5 || err < -2.5) begin
            failures++;
            $display("FAIL mag %f ang %f phase %0d duty %0d exp %f", mag, ang, k, duty[k], d);
          end
        end
        // expected sector number from the voltage angle (60-degree sextants)
        case (int'($floor(ang / 1.0471975512)))
          0: exp_sector = 3; 1: exp_sector = 1; 2: exp_sector = 5;
          3: exp_sector = 4; 4: exp_sector = 6; default: exp_sector = 2;
        endcase
        checks++;
        if (sector != 3'(exp_sector)) begin
          failures++;
          $display("FAIL sector %0d exp %0d at ang %f", sector, exp_sector, ang);
        end
        sect_seen[sector]++;
      end
    end
    for (int k = 1; k <= 6; k++) begin
      checks++;
      if (sect_seen[k] == 0) begin failures++; $display("FAIL sector %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
