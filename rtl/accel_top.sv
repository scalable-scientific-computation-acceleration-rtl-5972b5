// accel_top: the two accelerators of this design side by side.
//
// u_burstz is the BurstZ+ stencil platform: a five-endpoint memory arbiter
// shared by the host, three ZFP-V2 decompressors and one ZFP-V2 compressor
// around a 3D heat dissipation stencil core. Its host endpoint (for a PCIe
// DMA engine) and its memory controller port are brought out as b_host_*
// and b_mem_*, since neither the PCIe link nor the DRAM controller is part
// of this RTL. u_zipnn is the ZipNN k-nearest-neighbour engine over three
// compressed columns; its compressed column inputs (from flash storage or
// the host) are brought out as k_in_*. The two share only the clock and
// reset. NX, NY (stencil plane size) and CHUNK_BYTES (compressed chunk
// size) are passed to the platform; everything else uses the defaults of
// the two subsystems. See those modules for interface details and timing.
module accel_top
  import zipnn_pkg::*;
#(
  parameter int unsigned NX          = 1024,
  parameter int unsigned NY          = 1024,
  parameter int unsigned CHUNK_BYTES = 6144
)(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    b_start,
  input  logic signed [15:0]      b_minexp,
  input  logic [63:0]             b_coef,
  input  logic [2:0][31:0]        b_src_addr,
  input  logic [2:0][31:0]        b_src_beats,
  input  logic [31:0]             b_dst_addr,
  output logic                    b_busy,
  output logic                    b_done,
  output logic [31:0]             b_out_beats,
  input  logic                    b_host_req_valid,
  output logic                    b_host_req_ready,
  input  logic [31:0]             b_host_req_addr,
  input  logic [8:0]              b_host_req_len,
  input  logic                    b_host_req_write,
  input  logic                    b_host_wr_valid,
  output logic                    b_host_wr_ready,
  input  logic [255:0]            b_host_wr_data,
  output logic                    b_host_rd_valid,
  input  logic                    b_host_rd_ready,
  output logic [255:0]            b_host_rd_data,
  output logic                    b_mem_req_valid,
  input  logic                    b_mem_req_ready,
  output logic [31:0]             b_mem_req_addr,
  output logic [8:0]              b_mem_req_len,
  output logic                    b_mem_req_write,
  output logic                    b_mem_wr_valid,
  input  logic                    b_mem_wr_ready,
  output logic [255:0]            b_mem_wr_data,
  input  logic                    b_mem_rd_valid,
  input  logic [255:0]            b_mem_rd_data,
  output logic [31:0]             b_n_bursts,
  output logic [31:0]             b_n_blocked,
  input  logic [2:0]              k_use_rle,
  input  logic [2:0]              k_use_delta,
  input  logic                    k_start,
  input  logic [2:0][31:0]        k_num_values,
  input  logic [2:0]              k_in_valid,
  output logic [2:0]              k_in_ready,
  input  logic [2:0][IN_W-1:0]    k_in_data,
  input  logic [3:0]              k_qvm_sel,
  input  logic                    k_qvm_we,
  input  logic [9:0]              k_qvm_addr,
  input  qent_t                   k_qvm_data,
  input  logic [10:0]             k_qvm_len,
  input  logic                    k_clear,
  input  logic [6:0]              k_rd_idx,
  output scored_t                 k_rd_res,
  output logic                    k_rd_valid,
  output logic                    k_done,
  output logic [31:0]             k_n_insert,
  output logic [31:0]             k_n_drop
);
  burstz_platform #(.NX(NX), .NY(NY), .CHUNK_BYTES(CHUNK_BYTES)) u_burstz (
    .clk, .rst_n, .start(b_start), .minexp(b_minexp), .coef(b_coef), .src_addr(b_src_addr),
    .src_beats(b_src_beats), .dst_addr(b_dst_addr), .busy(b_busy), .done(b_done),
    .out_beats(b_out_beats), .host_req_valid(b_host_req_valid),
    .host_req_ready(b_host_req_ready), .host_req_addr(b_host_req_addr),
    .host_req_len(b_host_req_len), .host_req_write(b_host_req_write),
    .host_wr_valid(b_host_wr_valid), .host_wr_ready(b_host_wr_ready),
    .host_wr_data(b_host_wr_data), .host_rd_valid(b_host_rd_valid),
    .host_rd_ready(b_host_rd_ready), .host_rd_data(b_host_rd_data),
    .mem_req_valid(b_mem_req_valid), .mem_req_ready(b_mem_req_ready),
    .mem_req_addr(b_mem_req_addr), .mem_req_len(b_mem_req_len),
    .mem_req_write(b_mem_req_write), .mem_wr_valid(b_mem_wr_valid),
    .mem_wr_ready(b_mem_wr_ready), .mem_wr_data(b_mem_wr_data),
    .mem_rd_valid(b_mem_rd_valid), .mem_rd_data(b_mem_rd_data), .n_bursts(b_n_bursts),
    .n_blocked(b_n_blocked));

  zipnn_top u_zipnn (
    .clk, .rst_n, .use_rle(k_use_rle), .use_delta(k_use_delta), .start(k_start),
    .num_values(k_num_values), .in_valid(k_in_valid), .in_ready(k_in_ready),
    .in_data(k_in_data), .qvm_sel(k_qvm_sel), .qvm_we(k_qvm_we), .qvm_addr(k_qvm_addr),
    .qvm_data(k_qvm_data), .qvm_len(k_qvm_len), .clear(k_clear), .rd_idx(k_rd_idx),
    .rd_res(k_rd_res), .rd_valid(k_rd_valid), .done(k_done), .n_insert(k_n_insert),
    .n_drop(k_n_drop));
endmodule
