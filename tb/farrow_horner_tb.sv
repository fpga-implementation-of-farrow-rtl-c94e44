// farrow_horner_tb: checks the Horner combiner of both coefficient sets.
//
// Random sub-filter outputs and random fractional delays d (including 0 and
// the largest code) are applied. The result must equal an integer Horner
// evaluation with floor truncation after each multiply, and must lie within
// NB-1 LSBs of the exact value sum_m v_m d^m computed in floating point.
module farrow_horner_tb;
  import farrow_pkg::*;

  localparam int unsigned BWL = branch_width(FARROW_LAGRANGE);
  localparam int unsigned BWS = branch_width(FARROW_LSP);

  logic signed [BWL-1:0]   vl [10];
  logic signed [BWS-1:0]   vs [4];
  logic signed [BWL+3:0]   yl;
  logic signed [BWS+3:0]   ys;
  frac_delay_t             d;

  farrow_horner #(.KIND(FARROW_LAGRANGE)) u_l (.v(vl), .d(d), .y(yl));
  farrow_horner #(.KIND(FARROW_LSP))      u_s (.v(vs), .d(d), .y(ys));

  int checks = 0, failures = 0;

  function automatic longint horner_int(longint v [10], int nb, longint dd);
    longint acc = v[nb-1];
    for (int m = nb - 2; m >= 0; m--) acc = ((acc * dd) >>> 16) + v[m];
    return acc;
  endfunction

  function automatic real poly_real(longint v [10], int nb, real dr);
    real y = 0.0, p = 1.0;
    for (int m = 0; m < nb; m++) begin
      y = y + real'(v[m]) * p;
      p = p * dr;
    end
    return y;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    longint v [10];
    for (int t = 0; t < 400; t++) begin
      case (t % 4)
        0: d = '0;
        1: d = '1;
        default: d = frac_delay_t'($urandom);
      endcase
      for (int m = 0; m < 10; m++) begin
        // Lagrange sub-filter outputs stay well inside 2^40 (8-bit data, Q.28)
        v[m] = longint'($signed($urandom)) * longint'($urandom_range(0, 255));
        vl[m] = BWL'(v[m]);
      end
      #1;
      check(longint'(yl) == horner_int(v, 10, longint'(d)), $sformatf("Lagrange exact, t=%0d", t));
      begin
        automatic real e = real'(yl) - poly_real(v, 10, real'(d) / 65536.0);
        check(e <= 0.0 && e >= -9.0, $sformatf("Lagrange error %f, t=%0d", e, t));
      end
      for (int m = 0; m < 4; m++) begin
        v[m] = longint'($signed($urandom) >>> 14);
        vs[m] = BWS'(v[m]);
      end
      #1;
      check(longint'(ys) == horner_int(v, 4, longint'(d)), $sformatf("LSP exact, t=%0d", t));
      begin
        automatic real e = real'(ys) - poly_real(v, 4, real'(d) / 65536.0);
        check(e <= 0.0 && e >= -3.0, $sformatf("LSP error %f, t=%0d", e, t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
