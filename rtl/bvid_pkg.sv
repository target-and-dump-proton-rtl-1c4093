// bvid_pkg - types and helpers shared by the beam imaging video blocks.
//
// Every block moves pixels as a valid/ready stream of pix_t words. A pixel
// carries its grey value plus two framing flags in the style of AXI4-Stream
// video: sof marks the first pixel of a frame (row 0, column 0) and eol the
// last pixel of every row. Blocks that know the frame size from parameters use
// the flags only to re-align their own row/column counters.
//
// The 8-bit grey value is this design's choice; the source material gives the
// frame sizes but not the pixel depth. 8 bits matches the pixel sums and the
// peak window means it reports (a 720x576 frame summing to about 9.5e6, a
// 10x10 window mean near 149).
//
// med9() is the median-of-nine exchange network (19 compare-exchange steps)
// used by the median filter: a fixed sorting network, so it maps to a tree of
// comparators and multiplexers with no control.
package bvid_pkg;

  localparam int PIX_W = 8;

  typedef logic [PIX_W-1:0] pixel_t;

  typedef struct packed {
    logic   sof;   // first pixel of the frame
    logic   eol;   // last pixel of a row
    pixel_t data;  // grey value
  } pix_t;

  // One entry of the remap table: the source column and row whose value the
  // corrected image shows at the current output position.
  localparam int MAP_W = 16;
  typedef struct packed {
    logic signed [MAP_W-1:0] src_y;
    logic signed [MAP_W-1:0] src_x;
  } map_t;

  // Median network: 19 compare-exchange steps on positions (lo, hi); after
  // each step position lo holds the smaller and hi the larger value.
  localparam int MED9_STEPS = 19;
  localparam int MED9_LO [MED9_STEPS] = '{1, 4, 7, 0, 3, 6, 1, 4, 7, 0, 5, 4, 3, 1, 2, 4, 4, 6, 4};
  localparam int MED9_HI [MED9_STEPS] = '{2, 5, 8, 1, 4, 7, 2, 5, 8, 3, 8, 7, 6, 4, 5, 7, 2, 4, 2};

  // Median of nine values: the three columns are sorted first, then the
  // median is picked from the max of minima, median of medians and min of
  // maxima. Position 4 holds the result.
  function automatic pixel_t med9(input pixel_t w [9]);
    pixel_t p [9];
    pixel_t t;
    p = w;
    for (int s = 0; s < MED9_STEPS; s++) begin
      if (p[MED9_LO[s]] > p[MED9_HI[s]]) begin
        t            = p[MED9_LO[s]];
        p[MED9_LO[s]] = p[MED9_HI[s]];
        p[MED9_HI[s]] = t;
      end
    end
    return p[4];
  endfunction

endpackage
