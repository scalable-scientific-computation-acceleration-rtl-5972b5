// tb_column_decoder: one column decoder is run in its three configurations
// (run-length + delta, delta only, Group Varint only). For each, a random
// column is encoded in software the way the compressor would (delta, then
// run-length, then Pipelined Group Varint), streamed in with random input
// gaps and output back-pressure, and every decoded value is compared.
module tb_column_decoder;
  import zipnn_pkg::*;
  import zipnn_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, in_valid, in_ready, out_valid, out_ready, use_rle, use_delta;
  logic [31:0] num_values;
  logic [511:0] in_data;
  beat_t out_beat;
  column_decoder dut (.clk, .rst_n, .use_rle, .use_delta, .start, .num_values, .in_valid,
                      .in_ready, .in_data, .out_valid, .out_ready, .out_beat);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  uq_t vals, coded;
  bq_t enc;

  task automatic drive();
    for (int w = 0; w < (enc.size() + 63) / 64; w++) begin
      for (int b = 0; b < 64; b++) in_data[8*b +: 8] = (64*w + b < enc.size()) ? enc[64*w + b] : 8'd0;
      in_valid = ($urandom_range(0, 3) != 0); #1;
      while (!(in_valid && in_ready)) begin @(posedge clk); #2; in_valid = 1; end
      @(posedge clk); #1;
      in_valid = 0;
    end
  endtask

  task automatic check();
    int idx;
    idx = 0;
    while (idx < vals.size()) begin
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (out_valid && out_ready) begin
        for (int k = 0; k < 8; k++) begin
          checks++;
          if ((idx + k < vals.size()) != out_beat.keep[k]) failures++;
          else if (out_beat.keep[k] && out_beat.v[k] != vals[idx + k]) begin
            failures++;
            if (failures < 6) $display("value %0d got %0d exp %0d", idx + k, out_beat.v[k], vals[idx + k]);
          end
        end
        checks++;
        if (out_beat.last != (idx + 8 >= vals.size())) failures++;
        idx += 8;
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    start = 0; num_values = 0; in_valid = 0; in_data = '0; out_ready = 0;
    use_rle = 0; use_delta = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int mode = 0; mode < 3; mode++) begin
      int unsigned v;
      vals.delete();
      v = 0;
      for (int i = 0; i < 900; i++) begin
        if (mode == 2) vals.push_back(rand_val());
        else begin
          if (mode == 1 || $urandom_range(0, 2) == 0) v += $urandom_range(1, 3000);
          vals.push_back(v);
        end
      end
      use_rle = (mode == 0);
      use_delta = (mode != 2);
      coded = use_delta ? delta_encode(vals) : vals;
      if (use_rle) coded = rle_encode(coded);
      enc = pgv_encode(coded, 32);
      num_values = coded.size();
      start = 1;
      @(posedge clk); #1;
      start = 0;
      fork
        drive();
        check();
      join
      repeat (5) @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
