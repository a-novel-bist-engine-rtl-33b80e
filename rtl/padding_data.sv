// padding_data: padding values for the row edges of the one-dimensional
// detection windows, one per Bayer colour.
//
// The detectors need HALF neighbours on both sides of every pixel; at the
// start and end of a row some of them lie outside the array and are replaced
// by a padding value. Two sources are offered (the document names the block
// but not its content, so both are this design's choice):
//   mode 0 - constant: a per-colour value from the control registers, e.g.
//            the expected dark level;
//   mode 1 - replicate: the first pixel of that colour in the row pads the
//            left edge, the last one pads the right edge.
// The mode and constants are latched on `load` (start of a run), so register
// writes during a frame do not disturb it.
//
// Interface: for each lane, lane_pix/lane_first/lane_data describe the pixel
// being steered this cycle; pad[c] is combinational from them: in mode 1 it
// is lane_data on a first pixel and the last pixel seen otherwise.
module padding_data
  import bist_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic mode_in,
  input  pix_t const_in [NCOLOR],
  input  logic lane_pix  [NCOLOR],
  input  logic lane_first[NCOLOR],
  input  pix_t lane_data,
  output pix_t pad       [NCOLOR]
);
  logic mode_q;
  pix_t const_q[NCOLOR];
  pix_t last_q [NCOLOR];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= 1'b0;
      for (int c = 0; c < NCOLOR; c++) begin
        const_q[c] <= '0;
        last_q[c]  <= '0;
      end
    end else begin
      if (load) begin
        mode_q <= mode_in;
        for (int c = 0; c < NCOLOR; c++) const_q[c] <= const_in[c];
      end
      for (int c = 0; c < NCOLOR; c++)
        if (lane_pix[c]) last_q[c] <= lane_data;
    end
  end

  always_comb begin
    for (int c = 0; c < NCOLOR; c++) begin
      if (!mode_q)            pad[c] = const_q[c];
      else if (lane_first[c]) pad[c] = lane_data;
      else                    pad[c] = last_q[c];
    end
  end

endmodule
