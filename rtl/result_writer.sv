// result_writer -- writes the image of winning ranks and probe-set indices.
//
// A window whose newest column is `col` belongs to the probe-set position whose left edge is
// col - (PS_COLS-1).  Positions with col < PS_COLS-1 would reach into the previous strip and are
// dropped.  Every other position is written, one word per window, to
//   res_addr = row * (IMG_COLS - PS_COLS + 1) + (col - PS_COLS + 1)
// so the result image has IMG_ROWS-STRIP_ROWS+1 rows of IMG_COLS-PS_COLS+1 entries.  The write
// port is registered (one cycle after `in_valid`) and is assumed to accept a write every cycle.
// `done` pulses together with the write of the last position of the image.  Producing an image
// of winners per vehicle follows the published design; the address map and port are this
// design's choices.
module result_writer
  import atr_pkg::*;
#(
  parameter int IMG_ROWS   = atr_pkg::IMAGE_ROWS,
  parameter int IMG_COLS   = atr_pkg::IMAGE_COLS,
  parameter int STRIP_ROWS = atr_pkg::WIN_ROWS,
  parameter int PS_COLS    = atr_pkg::PS_COLS_V[0],
  parameter int RES_ADDR_W = $clog2((IMG_ROWS - STRIP_ROWS + 1) * (IMG_COLS - PS_COLS + 1))
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  pos_t                  in_pos,
  input  result_t               in_res,
  output logic                  res_we,
  output logic [RES_ADDR_W-1:0] res_addr,
  output result_t               res_data,
  output logic                  done
);
  localparam int OUT_COLS = IMG_COLS - PS_COLS + 1;

  wire keep = in_valid && (int'(in_pos.col) >= PS_COLS - 1);
  wire [RES_ADDR_W-1:0] addr_d = RES_ADDR_W'(int'(in_pos.row) * OUT_COLS
                                             + int'(in_pos.col) - (PS_COLS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_we <= 1'b0; res_addr <= '0; res_data <= '0; done <= 1'b0;
    end else begin
      res_we <= keep;
      done   <= keep && (int'(in_pos.row) == IMG_ROWS - STRIP_ROWS)
                     && (int'(in_pos.col) == IMG_COLS - 1);
      if (keep) begin
        res_addr <= addr_d;
        res_data <= in_res;
      end
    end
  end
endmodule
