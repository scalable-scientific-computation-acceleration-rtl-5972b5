// tb_pgv_decoder: random values of 1 to 4 bytes are encoded in software
// into N = 32 Pipelined Group Varint sections and decoded; every value, the
// keep mask and last flag of the final beat are compared. A second stream
// with the output always ready must come out at one beat per cycle from the
// first beat to the last (header lookahead hides section boundaries).
module tb_pgv_decoder;
  import zipnn_pkg::*;
  import zipnn_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, in_valid, in_ready, out_valid, out_ready;
  logic [31:0] num_values;
  logic [511:0] in_data;
  beat_t out_beat;
  pgv_decoder dut (.clk, .rst_n, .start, .num_values, .in_valid, .in_ready, .in_data,
                   .out_valid, .out_ready, .out_beat);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  uq_t vals;
  bq_t enc;
  bit  stalls;

  task automatic drive();
    for (int w = 0; w < (enc.size() + 63) / 64; w++) begin
      for (int b = 0; b < 64; b++) in_data[8*b +: 8] = (64*w + b < enc.size()) ? enc[64*w + b] : 8'd0;
      in_valid = 1; #1;
      while (!in_ready) begin @(posedge clk); #2; end
      @(posedge clk); #1;
      in_valid = 0;
    end
  endtask

  task automatic check(output int first_c, output int last_c);
    int idx, cyc;
    idx = 0; cyc = 0; first_c = -1; last_c = -1;
    while (idx < vals.size()) begin
      out_ready = stalls ? ($urandom_range(0, 3) != 0) : 1'b1;
      #1;
      if (out_valid && out_ready) begin
        if (first_c < 0) first_c = cyc;
        last_c = cyc;
        for (int k = 0; k < 8; k++) begin
          checks++;
          if ((idx + k < vals.size()) != out_beat.keep[k]) failures++;
          else if (out_beat.keep[k] && out_beat.v[k] != vals[idx + k]) begin
            failures++;
            if (failures < 6) $display("value %0d got %h exp %h", idx + k, out_beat.v[k], vals[idx + k]);
          end
        end
        checks++;
        if (out_beat.last != (idx + 8 >= vals.size())) failures++;
        idx += 8;
      end
      @(posedge clk); #1;
      cyc++;
    end
  endtask

  initial begin
    int f, l;
    start = 0; num_values = 0; in_valid = 0; in_data = '0; out_ready = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      vals.delete();
      for (int i = 0; i < ((pass == 0) ? 1000 : 8 * 32 * 6); i++) vals.push_back(rand_val());
      enc = pgv_encode(vals, 32);
      stalls = (pass == 0);
      num_values = vals.size();
      start = 1;
      @(posedge clk); #1;
      start = 0;
      fork
        drive();
        check(f, l);
      join
      if (pass == 1) begin
        checks++;
        if (l - f + 1 != vals.size() / 8) begin
          failures++; $display("beats %0d took %0d cycles", vals.size() / 8, l - f + 1);
        end
        $display("%0d beats in %0d cycles", vals.size() / 8, l - f + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
