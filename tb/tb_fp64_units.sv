// tb_fp64_units: the double-precision adder and multiplier are compared
// bit for bit with the simulator's own IEEE arithmetic (round to nearest
// even) on random operands: same and opposite signs, close exponents (deep
// cancellation), far exponents, exact halves (ties) and zeros. Cases whose
// operands or exact result fall outside the normal range are skipped, as
// the units flush those to zero by design.
module tb_fp64_units;
  int checks = 0, failures = 0;
  logic [63:0] a, b, ya, ym;
  fp64_add u_add (.a, .b, .y(ya));
  fp64_mul u_mul (.a, .b, .y(ym));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit normal(input logic [63:0] x);
    return (x[62:52] != 0 && x[62:52] != 11'h7FF) || (x[62:0] == 0);
  endfunction

  function automatic logic [63:0] rnd(input int style);
    logic [63:0] x;
    x = {$urandom, $urandom};
    case (style)
      0: x[62:52] = 11'(1023 + $urandom_range(0, 40) - 20);
      1: x[62:52] = 11'(1023 + $urandom_range(0, 4) - 2);
      2: x[62:52] = 11'($urandom_range(1, 2046));
      3: begin x[62:52] = 11'(1023 + $urandom_range(0, 8) - 4); x[20:0] = '0; end
      default: x = {x[63], 63'd0};
    endcase
    return x;
  endfunction

  initial begin
    for (int i = 0; i < 200000; i++) begin
      real ra, rb;
      logic [63:0] ea, em;
      int st;
      st = (i % 50 == 0) ? 4 : (i % 4);
      a = rnd(st);
      b = rnd((i % 7 == 0) ? 4 : (i % 4));
      if (i % 3 == 0) b = {~a[63], a[62:52], a[51:30], b[29:0]};  // near cancellation
      #1;
      ra = $bitstoreal(a); rb = $bitstoreal(b);
      ea = $realtobits(ra + rb);
      em = $realtobits(ra * rb);
      if (ea[62:0] == 0) ea = 64'd0;       // the adder returns +0 on cancellation
      if (normal(a) && normal(b) && normal(ea)) begin
        checks++;
        if (ya != ea && !(ea[62:0] == 0 && ya[62:0] == 0)) begin
          failures++;
          if (failures < 6) $display("add %h + %h = %h exp %h", a, b, ya, ea);
        end
      end
      if (normal(a) && normal(b) && normal(em)) begin
        checks++;
        if (ym != em && !(em[62:0] == 0 && ym[62:0] == 0)) begin
          failures++;
          if (failures < 6) $display("mul %h * %h = %h exp %h", a, b, ym, em);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
