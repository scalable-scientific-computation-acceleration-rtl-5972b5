// tb_delta_decoder: random ascending sequences are delta encoded in
// software and decoded, with partial final beats and several streams back
// to back (the running sum must restart after `last`). One beat per cycle.
module tb_delta_decoder;
  import zipnn_pkg::*;
  import zipnn_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  beat_t in_beat, out_beat;
  delta_decoder dut (.clk, .rst_n, .in_valid, .in_ready, .in_beat, .out_valid, .out_ready, .out_beat);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  uq_t vals, enc;

  initial begin
    in_valid = 0; in_beat = '0; out_ready = 1;
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    for (int s = 0; s < 5; s++) begin
      int unsigned v;
      int nb, idx;
      vals.delete();
      v = $urandom_range(0, 100);
      for (int i = 0; i < 100 + 13 * s; i++) begin v += $urandom_range(0, 300); vals.push_back(v); end
      enc = delta_encode(vals);
      nb = (enc.size() + 7) / 8;
      idx = 0;
      fork
        for (int w = 0; w < nb; w++) begin
          for (int k = 0; k < 8; k++) begin
            in_beat.v[k] = (8*w + k < enc.size()) ? enc[8*w + k] : 32'hdead;
            in_beat.keep[k] = (8*w + k < enc.size());
          end
          in_beat.last = (w == nb - 1);
          in_valid = 1; #1;
          while (!in_ready) begin @(posedge clk); #2; end
          @(posedge clk); #1;
          in_valid = 0;
        end
        while (idx < vals.size()) begin
          out_ready = ($urandom_range(0, 3) != 0);
          #1;
          if (out_valid && out_ready) begin
            for (int k = 0; k < 8; k++)
              if (out_beat.keep[k]) begin
                checks++;
                if (out_beat.v[k] != vals[idx]) begin
                  failures++;
                  if (failures < 6) $display("s%0d v%0d got %0d exp %0d", s, idx, out_beat.v[k], vals[idx]);
                end
                idx++;
              end
          end
          @(posedge clk); #1;
        end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
