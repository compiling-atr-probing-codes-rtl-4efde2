// atr_top -- three probing engines side by side, one per vehicle and per FPGA.
//
// The probing task is partitioned by vehicle: engine 0 holds the M60 tank's 81 probe sets,
// engine 1 the M113's and engine 2 the M901's.  Each engine scans the same image from its own
// local memory and writes its own image of winning ranks and probe-set indices; the engines do
// not interact.  Choosing the best vehicle per position, and loading the image, is left to the
// host, which connects through these ports.
//
// Interface: `start` (one clock) starts all three engines with the common `threshold`;
// `busy[v]`/`done[v]` report each engine, `all_done` is the AND of `done`.  Port v of each
// array belongs to engine v: a request/grant read port (read data returns in order with
// `mem_rvalid[v]`) and a write port for results.  Result addresses are RES_ADDR_W bits wide,
// enough for the widest result image (the vehicle with the narrowest probe sets).
// The one-vehicle-per-FPGA partitioning follows the published system; the shared start and
// threshold are this design's choices.
module atr_top
  import atr_pkg::*;
#(
  parameter int IMG_ROWS   = atr_pkg::IMAGE_ROWS,
  parameter int IMG_COLS   = atr_pkg::IMAGE_COLS,
  parameter int ADDR_W     = $clog2(IMG_ROWS * IMG_COLS / 2),
  parameter int RES_ADDR_W = $clog2((IMG_ROWS - WIN_ROWS + 1) * (IMG_COLS - 25 + 1))
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [PIX_W-1:0]      threshold,
  output logic [N_VEH-1:0]      busy,
  output logic [N_VEH-1:0]      done,
  output logic                  all_done,
  output logic [N_VEH-1:0]      mem_req,
  output logic [ADDR_W-1:0]     mem_addr   [N_VEH],
  input  logic [N_VEH-1:0]      mem_gnt,
  input  logic [N_VEH-1:0]      mem_rvalid,
  input  logic [WORD_W-1:0]     mem_rdata  [N_VEH],
  output logic [N_VEH-1:0]      res_we,
  output logic [RES_ADDR_W-1:0] res_addr   [N_VEH],
  output result_t               res_data   [N_VEH]
);
  for (genvar v = 0; v < N_VEH; v++) begin : g_veh
    probe_engine #(.VEH(v), .IMG_ROWS(IMG_ROWS), .IMG_COLS(IMG_COLS), .ADDR_W(ADDR_W),
                   .RES_ADDR_W(RES_ADDR_W)) u_eng (
      .clk, .rst_n, .start, .threshold,
      .busy(busy[v]), .done(done[v]),
      .mem_req(mem_req[v]), .mem_addr(mem_addr[v]), .mem_gnt(mem_gnt[v]),
      .mem_rvalid(mem_rvalid[v]), .mem_rdata(mem_rdata[v]),
      .res_we(res_we[v]), .res_addr(res_addr[v]), .res_data(res_data[v]));
  end

  assign all_done = &done;
endmodule
