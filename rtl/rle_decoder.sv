// rle_decoder: wide run-length decoder.
//
// The input is a stream of <value, count> pairs, two lanes per pair (value
// in the even lane, count, at least 1, in the odd lane), four pairs per
// 8-lane beat. Pairs wait in a 12-entry queue. Each cycle the output beat
// is filled lane by lane from the head pairs, so one beat can hold the tail
// of one run and the beginnings of several others, and long runs span many
// beats. Full beats leave every cycle as long as pairs are queued; only the
// final beat of a stream (after the pair that came with `last`) may be
// partly filled.
//
// Interface: valid/ready beats in and out; one output beat per cycle.
module rle_decoder
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
  // 12 entries: input is taken while at most 8 pairs remain, and 8 or more
  // queued pairs always fill a beat, so the queue cannot stall itself.
  localparam int unsigned QD = 12;
  logic [QD-1:0][31:0] qv_q, qc_q;      // pair values and remaining counts
  logic [3:0]          qn_q;            // pairs queued
  logic                qlast_q;         // queue holds the stream's final pair

  logic [3:0]          pops;            // pairs used up by this beat
  logic [31:0]         head_rem;        // what remains of the pair left at the head
  logic [3:0]          fill;
  logic [LANES-1:0][31:0] ov;

  always_comb begin
    int p;
    logic [31:0] r;
    p = 0;
    r = qc_q[0];
    fill = '0;
    ov = '0;
    for (int l = 0; l < LANES; l++) begin
      if (p < int'(qn_q)) begin
        ov[l] = qv_q[p];
        fill  = fill + 4'd1;
        r     = r - 32'd1;
        if (r == 0) begin
          p = p + 1;
          r = (p < QD) ? qc_q[p] : 32'd0;
        end
      end
    end
    pops     = 4'(p);
    head_rem = r;
  end

  assign out_valid = (fill == 4'(LANES)) || (qlast_q && qn_q != 0);
  always_comb begin
    out_beat.v    = ov;
    out_beat.keep = '0;
    for (int l = 0; l < LANES; l++) out_beat.keep[l] = (4'(l) < fill);
    out_beat.last = qlast_q && (pops == qn_q);
  end

  logic       emit;
  logic [3:0] qn_after;
  assign emit     = out_valid && out_ready;
  assign qn_after = emit ? qn_q - pops : qn_q;
  assign in_ready = !qlast_q && (qn_after <= 4'(QD - 4));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qv_q <= '0; qc_q <= '0; qn_q <= '0; qlast_q <= 1'b0;
    end else begin
      logic [QD-1:0][31:0] v, c;
      int n;
      v = qv_q; c = qc_q; n = int'(qn_q);
      if (emit) begin
        for (int i = 0; i < QD; i++) begin
          v[i] = (i + int'(pops) < QD) ? qv_q[i + int'(pops)] : 32'd0;
          c[i] = (i + int'(pops) < QD) ? ((i == 0) ? head_rem : qc_q[i + int'(pops)]) : 32'd0;
        end
        n = n - int'(pops);
        if (out_beat.last) qlast_q <= 1'b0;
      end
      if (in_valid && in_ready) begin
        for (int k = 0; k < 4; k++)
          if (in_beat.keep[2*k]) begin
            v[n] = in_beat.v[2*k];
            c[n] = (in_beat.v[2*k+1] == 0) ? 32'd1 : in_beat.v[2*k+1];
            n = n + 1;
          end
        if (in_beat.last) qlast_q <= 1'b1;
      end
      qv_q <= v;
      qc_q <= c;
      qn_q <= 4'(n);
    end
  end
endmodule
