// delta_decoder: wide delta decoder.
//
// Each value of the stream is the difference to the previous one; the
// decoder adds the valid lanes of a beat as a running prefix sum on top of
// the last value of the previous beat. The running value restarts at zero
// after a beat marked last.
//
// Interface: valid/ready beats in and out, one register stage, one beat per
// cycle.
module delta_decoder
  import zipnn_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  beat_t in_beat,
  output logic  out_valid,
  input  logic  out_ready,
  output beat_t out_beat
);
  logic [31:0] acc_q;
  beat_t       res;
  logic [31:0] acc_n;

  always_comb begin
    logic [31:0] s;
    s = acc_q;
    res = in_beat;
    for (int l = 0; l < LANES; l++)
      if (in_beat.keep[l]) begin
        s = s + in_beat.v[l];
        res.v[l] = s;
      end
    acc_n = in_beat.last ? 32'd0 : s;
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      out_valid <= 1'b0;
      out_beat  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_beat <= res;
        acc_q    <= acc_n;
      end
    end
  end
endmodule
