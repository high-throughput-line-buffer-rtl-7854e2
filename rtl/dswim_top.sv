// dswim_top: the two D-SWIM image-processing pipelines side by side.
//
//  * Conv2D pipeline (c_*): one D-SWIM buffer (H = 3, N_blk = 16) feeding
//    16 parallel 3x3 multiply-accumulate operators. The raw 3x16 window of
//    the buffer is brought out as well (c_win_*), as the buffer's stencil
//    output. Convolution results leave 8 cycles after their block is
//    accepted; c_res[j] is the convolution of the window whose columns are
//    stream x positions c_res_x+j-2 .. c_res_x+j in lines c_res_line-2 ..
//    c_res_line.
//  * Harris corner pipeline (h_*): three D-SWIM buffers with Sobel, window
//    product-sum and response operators (see harris).
// Each pipeline has its own instruction load bus, height register and
// block stream, so the two can run different image sizes at the same time.
// All widths follow the case-study configuration: 16 pixels of 8 bits per
// block and 3-line windows; the widest line is NLINE_MAX pixels.
module dswim_top
  import dswim_pkg::*;
#(
  parameter int unsigned NBLK      = 16,
  parameter int unsigned NLINE_MAX = 4096,
  parameter int unsigned H         = 3,
  parameter int unsigned IAW       = $clog2(NBLK),
  parameter int unsigned ACC_W     = PIX_W + 8 + $clog2(9) + 1,
  parameter int unsigned R_W       = 2 * (2 * PIX_W + $clog2(9) + 1) + 4
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // ---- Conv2D pipeline
  input  logic                               c_inst_we,
  input  logic [IAW-1:0]                     c_inst_addr,
  input  logic [INSTR_W-1:0]                 c_inst_data,
  input  logic                               c_cfg_we,
  input  logic [15:0]                        c_cfg_height,
  input  logic signed [H-1:0][2:0][7:0]      c_weights,
  input  logic                               c_in_valid,
  output logic                               c_in_ready,
  input  logic [NBLK-1:0][PIX_W-1:0]         c_in_blk,
  output logic                               c_win_valid,
  output logic [H-1:0][NBLK-1:0][PIX_W-1:0] c_win,
  output logic [15:0]                        c_win_line,
  output logic [15:0]                        c_win_x,
  output logic                               c_win_last,
  output logic                               c_res_valid,
  output logic signed [NBLK-1:0][ACC_W-1:0]  c_res,
  output logic [15:0]                        c_res_line,
  output logic [15:0]                        c_res_x,
  output logic                               c_res_last,
  // ---- Harris corner pipeline
  input  logic                               h_inst_we,
  input  logic [IAW-1:0]                     h_inst_addr,
  input  logic [INSTR_W-1:0]                 h_inst_data,
  input  logic                               h_cfg_we,
  input  logic [15:0]                        h_cfg_height,
  input  logic signed [R_W-1:0]              h_threshold,
  output logic                               h_busy,
  input  logic                               h_in_valid,
  output logic                               h_in_ready,
  input  logic [NBLK-1:0][PIX_W-1:0]         h_in_blk,
  output logic                               h_out_valid,
  output logic signed [NBLK-1:0][R_W-1:0]    h_out_r,
  output logic [NBLK-1:0]                    h_out_corner,
  output logic [15:0]                        h_out_line,
  output logic [15:0]                        h_out_x
);
  dswim_buffer #(.H(H), .NBLK(NBLK), .NLINE_MAX(NLINE_MAX), .IDEPTH(NBLK), .IAW(IAW)) u_cbuf (
    .clk, .rst_n,
    .inst_we (c_inst_we), .inst_addr (c_inst_addr), .inst_data (c_inst_data),
    .cfg_we (c_cfg_we), .cfg_height (c_cfg_height),
    .in_valid (c_in_valid), .in_ready (c_in_ready), .in_blk (c_in_blk),
    .out_valid (c_win_valid), .out_win (c_win), .out_line (c_win_line),
    .out_x (c_win_x), .out_last (c_win_last)
  );

  conv2d #(.H(H), .KW(3), .NBLK(NBLK), .ACC_W(ACC_W)) u_conv (
    .clk, .rst_n, .weights (c_weights),
    .in_valid (c_win_valid), .in_win (c_win), .in_line (c_win_line),
    .in_x (c_win_x), .in_last (c_win_last),
    .out_valid (c_res_valid), .out_blk (c_res), .out_line (c_res_line),
    .out_x (c_res_x), .out_last (c_res_last)
  );

  harris #(.NBLK(NBLK), .NLINE_MAX(NLINE_MAX), .IDEPTH(NBLK), .IAW(IAW),
           .SUM_W(2 * PIX_W + $clog2(9) + 1), .R_W(R_W)) u_harris (
    .clk, .rst_n,
    .inst_we (h_inst_we), .inst_addr (h_inst_addr), .inst_data (h_inst_data),
    .cfg_we (h_cfg_we), .cfg_height (h_cfg_height), .threshold (h_threshold),
    .busy (h_busy),
    .in_valid (h_in_valid), .in_ready (h_in_ready), .in_blk (h_in_blk),
    .out_valid (h_out_valid), .out_r (h_out_r), .out_corner (h_out_corner),
    .out_line (h_out_line), .out_x (h_out_x)
  );
endmodule
