// burstz_platform: the BurstZ+ stencil platform for 3D heat dissipation.
//
// On-board memory is shared through a five-endpoint memory arbiter:
// endpoint 0 is the host (its burst channels are ports of this module, for
// a PCIe DMA engine), endpoints 1-3 feed three ZFP-V2 decompressors and
// endpoint 4 takes the output of one ZFP-V2 compressor. To update plane z,
// the host stores the compressed planes z-1, z and z+1 in memory, sets
// their addresses and lengths, and pulses start. Three read engines fetch
// the planes one chunk per burst and stream them, with chunk boundaries
// marked, into the decompressors; the heat stencil core takes one 4-double
// element from each decompressed plane per cycle and produces the updated
// plane, which the compressor packs into chunks. The write engine posts a
// one-chunk write burst for every chunk the compressor starts. When the
// plane is finished and all its output has entered the compressor, the
// compressor is flushed (own choice), and done rises once the
// last write burst has been issued; out_beats then holds the compressed
// length of the new plane.
//
// Interface: host_* is endpoint 0 of the arbiter (see mem_arbiter); mem_*
// is the memory controller port; start/minexp/coef/src_*/dst_addr
// configure one plane update. Addresses and lengths count 32-byte beats;
// compressed planes are whole chunks (CHUNK_BYTES / 32 beats each).
// Counters report arbiter bursts and blocked cycles.
//
// The endpoint assignment, one compressor and three decompressors around a
// plane-streaming stencil core, and chunked compressed data follow the
// document. The read and write engines (one chunk per burst, one posted
// request at a time) and the start/done control are this design's own.
// Every group of four consecutive elements of a plane forms one 4x4 ZFP
// block (four rows of four doubles), so NX/4 * NY must be a multiple of 4.
module burstz_platform #(
  parameter int unsigned NX          = 1024,
  parameter int unsigned NY          = 1024,
  parameter int unsigned CHUNK_BYTES = 6144,
  parameter int unsigned MAX_BURST   = 256,
  parameter int unsigned BUF_DEPTH   = 512,
  parameter int unsigned N_ENC       = 4,
  parameter int unsigned N_DEC       = 4,
  localparam int unsigned CW = CHUNK_BYTES / 32,
  localparam int unsigned LW = $clog2(MAX_BURST + 1)
)(
  input  logic               clk,
  input  logic               rst_n,
  // Plane update control.
  input  logic               start,
  input  logic signed [15:0] minexp,
  input  logic [63:0]        coef,
  input  logic [2:0][31:0]   src_addr,
  input  logic [2:0][31:0]   src_beats,
  input  logic [31:0]        dst_addr,
  output logic               busy,
  output logic               done,
  output logic [31:0]        out_beats,
  // Host endpoint.
  input  logic               host_req_valid,
  output logic               host_req_ready,
  input  logic [31:0]        host_req_addr,
  input  logic [LW-1:0]      host_req_len,
  input  logic               host_req_write,
  input  logic               host_wr_valid,
  output logic               host_wr_ready,
  input  logic [255:0]       host_wr_data,
  output logic               host_rd_valid,
  input  logic               host_rd_ready,
  output logic [255:0]       host_rd_data,
  // Memory controller.
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic [31:0]        mem_req_addr,
  output logic [LW-1:0]      mem_req_len,
  output logic               mem_req_write,
  output logic               mem_wr_valid,
  input  logic               mem_wr_ready,
  output logic [255:0]       mem_wr_data,
  input  logic               mem_rd_valid,
  input  logic [255:0]       mem_rd_data,
  output logic [31:0]        n_bursts,
  output logic [31:0]        n_blocked
);
  localparam int unsigned NEP = 5;
  logic [NEP-1:0]            req_valid, req_ready, req_write, wr_valid, wr_ready, rd_valid, rd_ready;
  logic [NEP-1:0][31:0]      req_addr;
  logic [NEP-1:0][LW-1:0]    req_len;
  logic [NEP-1:0][255:0]     wr_data, rd_data;

  mem_arbiter #(.N_EP(NEP), .W(256), .AW(32), .MAX_BURST(MAX_BURST), .BUF_DEPTH(BUF_DEPTH)) u_arb (
    .clk, .rst_n, .req_valid, .req_ready, .req_addr, .req_len, .req_write,
    .wr_valid, .wr_ready, .wr_data, .rd_valid, .rd_ready, .rd_data,
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_req_len, .mem_req_write,
    .mem_wr_valid, .mem_wr_ready, .mem_wr_data, .mem_rd_valid, .mem_rd_data,
    .n_bursts, .n_blocked);

  // Endpoint 0: host.
  assign req_valid[0]  = host_req_valid;
  assign host_req_ready = req_ready[0];
  assign req_addr[0]   = host_req_addr;
  assign req_len[0]    = host_req_len;
  assign req_write[0]  = host_req_write;
  assign wr_valid[0]   = host_wr_valid;
  assign host_wr_ready = wr_ready[0];
  assign wr_data[0]    = host_wr_data;
  assign host_rd_valid = rd_valid[0];
  assign rd_ready[0]   = host_rd_ready;
  assign host_rd_data  = rd_data[0];

  logic run_q;
  assign busy = run_q;

  // Endpoints 1-3: read engines and decompressors.
  logic [2:0]            d_valid, d_ready;
  logic [2:0][255:0]     d_data;
  for (genvar p = 0; p < 3; p++) begin : g_rd
    logic [31:0] issued_q;   // beats requested so far
    logic [31:0] recv_q;     // beats passed to the decompressor
    logic        dq_ready;
    assign req_valid[p+1] = run_q && (issued_q < src_beats[p]);
    assign req_addr[p+1]  = src_addr[p] + issued_q;
    assign req_len[p+1]   = LW'(CW);
    assign req_write[p+1] = 1'b0;
    assign wr_valid[p+1]  = 1'b0;
    assign wr_data[p+1]   = '0;
    assign rd_ready[p+1]  = dq_ready;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        issued_q <= '0;
        recv_q   <= '0;
      end else if (start) begin
        issued_q <= '0;
        recv_q   <= '0;
      end else begin
        if (req_valid[p+1] && req_ready[p+1]) issued_q <= issued_q + CW;
        if (rd_valid[p+1] && rd_ready[p+1])   recv_q   <= recv_q + 1;
      end
    end
    zfpv2_decompressor #(.N_DEC(N_DEC), .CHUNK_BYTES(CHUNK_BYTES)) u_dec (
      .clk, .rst_n, .minexp, .in_valid(rd_valid[p+1]), .in_ready(dq_ready),
      .in_data(rd_data[p+1]), .in_chunk_last((recv_q % CW) == CW - 1),
      .out_valid(d_valid[p]), .out_ready(d_ready[p]), .out_data(d_data[p]), .out_blk_last());
  end

  // Stencil core.
  logic        h_in_ready, h_valid, h_ready, plane_done;
  logic [3:0][63:0] h_data;
  heat3d_core #(.NX(NX), .NY(NY)) u_heat (
    .clk, .rst_n, .coef, .in_valid(&d_valid), .in_ready(h_in_ready),
    .in_data({d_data[2], d_data[1], d_data[0]}), .out_valid(h_valid), .out_ready(h_ready),
    .out_data(h_data), .plane_done);
  assign d_ready = {3{(&d_valid) && h_in_ready}};

  // Compressor and write engine (endpoint 4).
  logic flush_q, flush_done, c_valid, c_last;
  logic [255:0] c_data;
  zfpv2_compressor #(.N_ENC(N_ENC), .CHUNK_BYTES(CHUNK_BYTES)) u_comp (
    .clk, .rst_n, .minexp, .in_valid(h_valid), .in_ready(h_ready), .in_data(h_data),
    .flush(flush_q), .flush_done, .out_valid(c_valid), .out_ready(wr_ready[4]),
    .out_data(c_data), .out_chunk_last(c_last));
  assign wr_valid[4] = c_valid;
  assign wr_data[4]  = c_data;
  assign rd_ready[4] = 1'b1;

  logic [31:0] wbeats_q, wreq_q;   // beats written, beats requested
  logic        flushed_q, pdone_q;
  logic [31:0] hbeats_q;           // stencil output beats taken by the compressor
  assign req_valid[4] = wreq_q < ((wbeats_q + CW - 1) / CW) * CW;
  assign req_addr[4]  = dst_addr + wreq_q;
  assign req_len[4]   = LW'(CW);
  assign req_write[4] = 1'b1;
  assign out_beats    = wbeats_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q     <= 1'b0;
      done      <= 1'b0;
      flush_q   <= 1'b0;
      flushed_q <= 1'b0;
      pdone_q   <= 1'b0;
      hbeats_q  <= '0;
      wbeats_q  <= '0;
      wreq_q    <= '0;
    end else if (start) begin
      run_q     <= 1'b1;
      done      <= 1'b0;
      flush_q   <= 1'b0;
      flushed_q <= 1'b0;
      pdone_q   <= 1'b0;
      hbeats_q  <= '0;
      wbeats_q  <= '0;
      wreq_q    <= '0;
    end else begin
      flush_q <= 1'b0;                 // one-cycle flush request
      if (h_valid && h_ready) hbeats_q <= hbeats_q + 1;
      if (plane_done) pdone_q <= 1'b1;
      if (pdone_q && hbeats_q == 32'(NX / 4 * NY)) begin
        flush_q <= 1'b1;
        pdone_q <= 1'b0;
      end
      if (flush_done) begin
        flush_q   <= 1'b0;
        flushed_q <= 1'b1;
      end
      if (c_valid && wr_ready[4]) wbeats_q <= wbeats_q + 1;
      if (req_valid[4] && req_ready[4]) wreq_q <= wreq_q + CW;
      if (run_q && flushed_q && !req_valid[4] && req_ready[4]) begin
        run_q <= 1'b0;
        done  <= 1'b1;
      end
    end
  end
endmodule
