// beam_video_top - FPGA video processing chain of a proton beam imaging
// system.
//
// A camera image of the beam (COLS x ROWS grey pixels, one frame per 35 ms at
// the 28 Hz frame rate) streams through the chain once, one pixel per clock:
//
//   pixels in -> median_filter (3x3, switchable) -> geo_remap (distortion
//   correction against a streamed map) -> pixels out
//
// and the corrected stream is tapped by three frame statistics blocks that
// together form the machine-protection measurements: centroid (beam centre
// and RMS width), footprint_sum (beam inside and outside a rectangular
// footprint) and peak_density (largest WIN x WIN window mean and its place).
// Their results appear a few hundred clocks after each frame's last pixel and
// are held on output ports, where a processor (not part of this RTL) reads
// them.
//
// The five processing functions and their sizes come from the source design,
// which built and tested them as separate streaming cores. Their order here
// (filter, then correct, then measure) and the port-level result interface
// are this design's choices; a 1:1 map leaves the image unchanged, and
// median_en = 0 bypasses the filter.
//
// Interface: valid/ready streams for source pixels (in_*), remap entries
// (map_*) and corrected pixels (out_*), as described in geo_remap. The
// statistics see a pixel only when out_valid && out_ready, so back-pressure
// on the output slows the whole chain but never loses a pixel. remap_stall
// and out_oob report the remapper's buffer-full wait and black fill.
module beam_video_top
  import bvid_pkg::*;
#(
  parameter int COLS  = 720,
  parameter int ROWS  = 576,
  parameter int LINES = 64,
  parameter int WIN   = 10,
  parameter int FRAC  = 16,
  localparam int CW   = $clog2(COLS),
  localparam int RW   = $clog2(ROWS),
  localparam int XW   = $clog2(COLS + 1),
  localparam int YW   = $clog2(ROWS + 1),
  localparam int SW   = PIX_W + $clog2(COLS * ROWS + 1),
  localparam int WSW  = PIX_W + $clog2(WIN * WIN + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // control
  input  logic                  median_en,
  input  logic [RW-1:0]         fp_top,
  input  logic [RW-1:0]         fp_bottom,
  input  logic [CW-1:0]         fp_left,
  input  logic [CW-1:0]         fp_right,
  // source pixels
  input  logic                  in_valid,
  output logic                  in_ready,
  input  pix_t                  in_pix,
  // remap table entries
  input  logic                  map_valid,
  output logic                  map_ready,
  input  map_t                  map,
  // corrected pixels
  output logic                  out_valid,
  input  logic                  out_ready,
  output pix_t                  out_pix,
  output logic                  out_oob,
  output logic                  remap_stall,
  // centroid and RMS width
  output logic                  cen_valid,
  output logic                  cen_empty,
  output logic [SW-1:0]         cen_sum,
  output logic [XW+FRAC-1:0]    cen_x,
  output logic [YW+FRAC-1:0]    cen_y,
  output logic [XW+FRAC-1:0]    cen_rms_x,
  output logic [YW+FRAC-1:0]    cen_rms_y,
  // footprint sums
  output logic                  fp_valid,
  output logic [SW-1:0]         fp_total,
  output logic [SW-1:0]         fp_inside,
  output logic [SW-1:0]         fp_outside,
  // peak density
  output logic                  pk_valid,
  output logic [WSW-1:0]        pk_sum,
  output logic [PIX_W+FRAC-1:0] pk_mean,
  output logic [RW-1:0]         pk_row,
  output logic [CW-1:0]         pk_col
);

  logic med_valid, med_ready;
  pix_t med_pix;
  logic tap_valid;

  median_filter #(.COLS(COLS), .ROWS(ROWS)) u_median (
    .clk, .rst_n, .en(median_en),
    .in_valid, .in_ready, .in_pix,
    .out_valid(med_valid), .out_ready(med_ready), .out_pix(med_pix));

  geo_remap #(.COLS(COLS), .ROWS(ROWS), .LINES(LINES)) u_remap (
    .clk, .rst_n,
    .in_valid(med_valid), .in_ready(med_ready), .in_pix(med_pix),
    .map_valid, .map_ready, .map,
    .out_valid, .out_ready, .out_pix, .out_oob,
    .in_stall(remap_stall));

  assign tap_valid = out_valid && out_ready;

  centroid #(.COLS(COLS), .ROWS(ROWS), .FRAC(FRAC)) u_centroid (
    .clk, .rst_n, .in_valid(tap_valid), .in_pix(out_pix),
    .res_valid(cen_valid), .empty(cen_empty), .sum(cen_sum),
    .cx(cen_x), .cy(cen_y), .rms_x(cen_rms_x), .rms_y(cen_rms_y));

  footprint_sum #(.COLS(COLS), .ROWS(ROWS)) u_footprint (
    .clk, .rst_n, .top(fp_top), .bottom(fp_bottom), .left(fp_left), .right(fp_right),
    .in_valid(tap_valid), .in_pix(out_pix),
    .res_valid(fp_valid), .sum_total(fp_total), .sum_in(fp_inside), .sum_out(fp_outside));

  peak_density #(.COLS(COLS), .ROWS(ROWS), .WIN(WIN), .FRAC(FRAC)) u_peak (
    .clk, .rst_n, .in_valid(tap_valid), .in_pix(out_pix),
    .res_valid(pk_valid), .peak_sum(pk_sum), .peak_mean(pk_mean),
    .peak_row(pk_row), .peak_col(pk_col));

endmodule
