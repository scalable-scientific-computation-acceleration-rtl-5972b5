// tb_heat3d_core: three random planes (NX = 16, NY = 6) are streamed in and
// the updated middle plane compared bit for bit with a software stencil
// that adds in the same order, with the edges copied. Two planes are run
// back to back, the first with random input gaps and output back-pressure,
// the second at full rate, where the plane must take NX/4*NY + NX/4 cycles
// from the first input to the last output, plus the 5-cycle latency.
module tb_heat3d_core;
  localparam int NX = 16, NY = 6, NE = NX / 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready, plane_done;
  logic [63:0] coef;
  logic [2:0][3:0][63:0] in_data;
  logic [3:0][63:0] out_data;
  heat3d_core #(.NX(NX), .NY(NY)) dut (.clk, .rst_n, .coef, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .plane_done);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real g [3][NY][NX];
  real k;
  bit stalls;

  task automatic drive();
    for (int y = 0; y < NY; y++)
      for (int e = 0; e < NE; e++) begin
        for (int p = 0; p < 3; p++)
          for (int l = 0; l < 4; l++) in_data[p][l] = $realtobits(g[p][y][4*e + l]);
        in_valid = !stalls || ($urandom_range(0, 3) != 0); #1;
        while (!(in_valid && in_ready)) begin @(posedge clk); #2; in_valid = 1; end
        @(posedge clk); #1;
        in_valid = 0;
      end
  endtask

  task automatic check(output int last_cyc);
    int n, cyc;
    n = 0; cyc = 0;
    while (n < NE * NY) begin
      out_ready = !stalls || ($urandom_range(0, 2) != 0); #1;
      if (out_valid && out_ready) begin
        int y, e;
        y = n / NE; e = n % NE;
        for (int l = 0; l < 4; l++) begin
          int x;
          real r;
          x = 4*e + l;
          if (x == 0 || x == NX - 1 || y == 0 || y == NY - 1) r = g[1][y][x];
          else r = k * (((g[1][y][x-1] + g[1][y][x+1]) + (g[1][y-1][x] + g[1][y+1][x])) +
                        ((g[0][y][x] + g[2][y][x]) + g[1][y][x]));
          checks++;
          if (out_data[l] != $realtobits(r)) begin
            failures++;
            if (failures < 6) $display("y %0d x %0d got %h exp %h", y, x, out_data[l], $realtobits(r));
          end
        end
        n++;
      end
      @(posedge clk); #1;
      cyc++;
    end
    last_cyc = cyc;
  endtask

  initial begin
    int c;
    in_valid = 0; in_data = '0; out_ready = 0;
    k = 1.0 / 7.0;
    coef = $realtobits(k);
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int pl = 0; pl < 2; pl++) begin
      for (int p = 0; p < 3; p++)
        for (int y = 0; y < NY; y++)
          for (int x = 0; x < NX; x++) g[p][y][x] = 1.0 + $urandom_range(0, 1000000) / 1.0e6;
      stalls = (pl == 0);
      fork
        drive();
        check(c);
      join
      if (pl == 1) begin
        checks++;
        if (c != NE * NY + NE + 5) begin failures++; $display("plane took %0d cycles, exp %0d", c, NE * NY + NE + 5); end
      end
      repeat (3) @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
