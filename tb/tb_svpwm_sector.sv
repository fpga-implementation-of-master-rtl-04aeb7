// Self-checking testbench for svpwm_sector. Random voltage vectors of known
// angle phi and length m are turned into the sector signals Va, Vb, Vc and
// the times X, Y, Z (with PWMPRD/Vdc = 1). The sector code must match the
// geometric 60-degree sector (I..VI -> 3,1,5,4,6,2), and t1, t2 must equal
// the dwell times of the two adjacent vectors, sqrt(3)*m*sin(60-phi') and
// sqrt(3)*m*sin(phi') (phi' = angle within the sector), in the order the
// sector prescribes. The zero vector must give sector 0 and zero times.
module tb_svpwm_sector;
  import servo_pkg::*;

  sdata_t     va, vb, vc, x, y, z, t1, t2;
  logic [2:0] sect_no, sect_sel;

  svpwm_sector dut (.va, .vb, .vc, .sect_no, .sect_sel, .x, .y, .z, .t1, .t2);

  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;
  localparam real SQ3 = 1.7320508075688772;
  int geo2n [6] = '{3, 1, 5, 4, 6, 2};

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic sdata_t rnd(input real v);
    return sdata_t'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  initial begin
    for (int n = 0; n < 600; n++) begin
      real phi, m, al, be, ta, tb, e1, e2, ph;
      int g;
      phi = real'($urandom_range(0, 359999)) / 1000.0;
      ph  = phi - 60.0 * $floor(phi / 60.0);
      if (ph < 0.5 || ph > 59.5) continue;
      g   = int'($floor(phi / 60.0));
      m   = real'($urandom_range(500, 9000));
      al  = m * $cos(phi * PI / 180.0);
      be  = m * $sin(phi * PI / 180.0);
      va = rnd(be); vb = rnd(SQ3 * al - be); vc = rnd(-SQ3 * al - be);
      x  = rnd(SQ3 * be); y = rnd(SQ3 / 2.0 * be + 1.5 * al); z = rnd(SQ3 / 2.0 * be - 1.5 * al);
      sect_sel = 3'(geo2n[g]);
      #1;
      ta = SQ3 * m * $sin((60.0 - ph) * PI / 180.0);
      tb = SQ3 * m * $sin(ph * PI / 180.0);
      if (g % 2 == 0) begin e1 = ta; e2 = tb; end else begin e1 = tb; e2 = ta; end
      checks++;
      if (int'(sect_no) != geo2n[g] || absr(real'(t1) - e1) > 3.0 || absr(real'(t2) - e2) > 3.0) begin
        failures++;
        if (failures < 10) $display("phi=%f N=%0d/%0d t1=%0d/%f t2=%0d/%f", phi, sect_no, geo2n[g], t1, e1, t2, e2);
      end
    end
    va = 0; vb = 0; vc = 0; x = 18'sd100; y = 18'sd100; z = 18'sd100; sect_sel = 0;
    #1;
    checks++;
    if (sect_no != 0 || t1 != 0 || t2 != 0) begin failures++; $display("zero vector"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
