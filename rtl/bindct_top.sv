// bindct_top: 8x8 two-dimensional multiplierless DCT and its inverse, both
// built from bit-serial binDCT cores.
//
// Rows of 8 signed 8-bit pixels enter the forward engine; each pixel is
// turned into a 16-bit word with 8 fractional bits and halved (pixel * 128).
// The forward engine applies the 1-D forward binDCT to the rows, transposes
// them and applies it to the columns; its output is one column of
// coefficients per frame (coef_valid, coef_index, coef). The coefficients
// are not multiplied by the binDCT scale factors; the document leaves those
// to the quantiser.
//
// The coefficients also go, through a one-entry holding register, to the
// reverse engine, which undoes the two passes. Its result, doubled, is the
// reconstructed block, one row per frame (rec_valid, rec_index, rec), in
// the same 16-bit format, close to pixel * 256 (the doubling saturates). The pair of engines is the
// document's arrangement for checking the transform's error; chaining the
// forward output into the reverse input is this design's choice.
//
// fwd_stall, fwd_bubble, inv_stall and inv_bubble pulse for one cycle when
// an engine sends an empty frame into its core for either reason.
//
// WL sets the word length of the whole datapath (default 16, the
// document's implementation, with WL - 8 fractional bits; 10 to 61 bits).
// The document notes that the word length can be extended or truncated to
// the precision needed; the parameter is how this design offers that.
//
// Timing: a pixel row can be offered with pix_valid and is taken in the
// cycle where pix_ready is high (once per 19-cycle frame during the row
// phase). With rows always available a block takes 17 frames (323 cycles)
// per engine; coefficients of a block appear about 17 frames after its
// first row, reconstructed rows another 17 frames later.
module bindct_top
  import bindct_pkg::*;
#(
  parameter int unsigned WL = WORD     // word length; WL - 8 fractional bits
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pix_valid,
  output logic             pix_ready,
  input  logic signed [7:0] pix [LANES],
  output logic             coef_valid,
  output logic [2:0]       coef_index,
  output logic signed [WL-1:0] coef [LANES],
  output logic             rec_valid,
  output logic [2:0]       rec_index,
  output logic signed [WL-1:0] rec [LANES],
  output logic             fwd_stall,   // forward engine sent an empty row frame
  output logic             fwd_bubble,  // forward engine sent its bubble frame
  output logic             inv_stall,   // reverse engine waited for coefficients
  output logic             inv_bubble   // reverse engine sent its bubble frame
);
  localparam int unsigned FB = WL - 8;   // fractional bits
  typedef logic signed [WL-1:0] wd_t;

  wd_t fin [LANES];
  for (genvar l = 0; l < LANES; l++) begin : g_in
    // pixel in Q8.8, then the document's first /2
    assign fin[l] = wd_t'({{(WL-8){pix[l][7]}}, pix[l]} <<< (FB - 1));
  end

  dct2d_engine #(.INVERSE(1'b0), .WL(WL)) u_fwd (
    .clk, .rst_n,
    .in_valid (pix_valid),
    .in_ready (pix_ready),
    .in_data  (fin),
    .out_valid(coef_valid),
    .out_index(coef_index),
    .out_data (coef),
    .ev_stall (fwd_stall),
    .ev_bubble(fwd_bubble)
  );

  // One-entry holding register between the engines.
  logic  hold_valid, r_ready;
  wd_t hold [LANES];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      hold_valid <= 1'b0;
      for (int l = 0; l < LANES; l++) hold[l] <= '0;
    end else begin
      if (coef_valid) begin
        hold_valid <= 1'b1;
        hold       <= coef;
      end else if (r_ready) hold_valid <= 1'b0;
    end

  wd_t rout [LANES];
  logic  rout_valid;
  logic [2:0] rout_index;

  dct2d_engine #(.INVERSE(1'b1), .WL(WL)) u_inv (
    .clk, .rst_n,
    .in_valid (hold_valid),
    .in_ready (r_ready),
    .in_data  (hold),
    .out_valid(rout_valid),
    .out_index(rout_index),
    .out_data (rout),
    .ev_stall (inv_stall),
    .ev_bubble(inv_bubble)
  );

  // The document's final x2 of the reverse path, saturated to the word:
  // rounding can take a reconstructed -128 or +127 just past the range.
  assign rec_valid = rout_valid;
  assign rec_index = rout_index;
  for (genvar l = 0; l < LANES; l++) begin : g_out
    always_comb
      if (rout[l][WL-1] != rout[l][WL-2])
        rec[l] = rout[l][WL-1] ? wd_t'({1'b1, {(WL-1){1'b0}}})
                                 : wd_t'({1'b0, {(WL-1){1'b1}}});
      else
        rec[l] = wd_t'(rout[l] <<< 1);
  end

  // A coefficient vector must never overwrite one still waiting.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 coef_valid |-> !(hold_valid && !r_ready));

endmodule
