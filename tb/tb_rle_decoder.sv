// tb_rle_decoder: random runs (length 1 to 20, with some very long runs)
// are run-length encoded in software, packed four pairs per beat and
// decoded; every value, the keep mask and the last flag are compared. With
// the output always ready and runs of 2 to 4 (more values per input beat
// than an output beat holds), full beats must leave on consecutive cycles.
module tb_rle_decoder;
  import zipnn_pkg::*;
  import zipnn_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  beat_t in_beat, out_beat;
  rle_decoder dut (.clk, .rst_n, .in_valid, .in_ready, .in_beat, .out_valid, .out_ready, .out_beat);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  uq_t vals, enc;
  bit stalls;

  task automatic drive();
    int nb;
    nb = (enc.size() + 7) / 8;
    for (int w = 0; w < nb; w++) begin
      for (int k = 0; k < 8; k++) begin
        in_beat.v[k] = (8*w + k < enc.size()) ? enc[8*w + k] : 0;
        in_beat.keep[k] = (8*w + k < enc.size());
      end
      in_beat.last = (w == nb - 1);
      in_valid = 1; #1;
      while (!in_ready) begin @(posedge clk); #2; end
      @(posedge clk); #1;
      in_valid = 0;
    end
  endtask

  task automatic check(output int gaps);
    int idx;
    bit prev;
    idx = 0; gaps = 0; prev = 0;
    while (idx < vals.size()) begin
      out_ready = stalls ? ($urandom_range(0, 2) != 0) : 1'b1;
      #1;
      if (prev && !out_valid && idx > 0) gaps++;
      if (out_valid && out_ready) begin
        for (int k = 0; k < 8; k++) begin
          checks++;
          if ((idx + k < vals.size()) != out_beat.keep[k]) begin failures++; $display("keep %0d", idx); end
          else if (out_beat.keep[k] && out_beat.v[k] != vals[idx + k]) begin
            failures++;
            if (failures < 6) $display("value %0d got %0d exp %0d", idx + k, out_beat.v[k], vals[idx + k]);
          end
        end
        checks++;
        if (out_beat.last != (idx + 8 >= vals.size())) begin failures++; $display("last at %0d", idx); end
        idx += 8;
        prev = 1;
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    int g;
    in_valid = 0; in_beat = '0; out_ready = 0;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      vals.delete();
      while (vals.size() < 1500) begin
        int n;
        int unsigned v;
        n = (pass == 0 && $urandom_range(0, 20) == 0) ? $urandom_range(30, 200) :
            (pass == 0) ? $urandom_range(1, 3) : $urandom_range(2, 4);
        v = $urandom_range(0, 5000);
        repeat (n) vals.push_back(v);
      end
      enc = rle_encode(vals);
      stalls = (pass == 0);
      fork
        drive();
        check(g);
      join
      if (pass == 1) begin
        checks++;
        if (g > 2) begin failures++; $display("output gaps %0d", g); end
        $display("gaps in continuous pass: %0d", g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
