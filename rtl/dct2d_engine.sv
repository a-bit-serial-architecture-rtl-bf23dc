// dct2d_engine: 2-D 8x8 forward or reverse binDCT built around one
// bit-serial 1-D core that is used twice, once along rows and once along
// columns, with a transpose RAM in between.
//
// Time is divided into frames of 19 cycles. In every frame the serialiser
// sends one 8-word vector into the core (three guard zeros, then 16 bits
// LSB first) and the deserialiser collects the vector the core finished
// 12 cycles after the end of the previous frame. A block takes 17 frames:
//   8 row frames    rows from the input, one per frame when in_valid is
//                   high; a frame without input is sent empty (stall)
//   1 bubble frame  empty, so that the last row is written to the RAM
//                   before the first column is read
//   8 column frames columns read from the transpose RAM
// Results of row frames go to the RAM, results of column frames to the
// output, one column vector per frame with out_valid for one cycle.
//
// Scaling, by arithmetic shifts of the 16-bit words: the forward engine
// divides every core input by 4 and every core output by 2 (the caller
// halves the pixels once before); the reverse engine doubles every core
// input and leaves the outputs as they are (the caller doubles the final
// result). This is the document's arrangement of scalers around the
// forward and reverse cores. The frame schedule, the bubble frame, the
// stall behaviour and the handshake are this design's choices.
//
// The word length is the parameter WL (default 16, frames of WL + 3
// cycles); it must be at least 10 so that a result (12 cycles late) is
// complete within the frame after its own, and at most 61.
//
// Interface: in_ready is high for one cycle per frame, in the last cycle
// of a frame, while the engine takes rows; a row is taken when in_valid and
// in_ready are both high. There is no back-pressure on the output.
module dct2d_engine
  import bindct_pkg::*;
#(
  parameter bit          INVERSE = 1'b0,
  parameter int unsigned WL      = WORD     // word length in bits
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  logic signed [WL-1:0] in_data [LANES],
  output logic  out_valid,
  output logic [2:0] out_index,     // column number of out_data
  output logic signed [WL-1:0] out_data [LANES],
  output logic  ev_stall,           // a row frame went out empty
  output logic  ev_bubble           // the bubble frame went out
);
  localparam int unsigned LAT = 12;       // latency of the 1-D core
  localparam int unsigned FL  = WL + GUARD; // frame length

  // A result must be complete within the frame after its own.
  initial assert (FL > LAT && FL <= 2**POSW)
    else $error("dct2d_engine: word length %0d out of range", WL);

  typedef logic signed [WL-1:0] wd_t;

  typedef enum logic [1:0] {PH_ROWS, PH_BUBBLE, PH_COLS} phase_e;

  typedef struct packed {
    logic       valid;
    logic       col;      // 1: column pass, 0: row pass
    logic [2:0] idx;
  } tag_t;

  pos_t   pos, opos;
  phase_e phase;
  logic [2:0] idx;
  logic   load;
  tag_t   tag_cur, tag_prev, tag_new;
  wd_t  ram_col [LANES];
  wd_t  load_word [LANES];
  logic [WL-1:0] sr [LANES];
  logic   xs [LANES], ys [LANES];
  logic [WL-1:0] acc [LANES];
  wd_t  res [LANES];
  logic   done;

  function automatic wd_t prescale(wd_t w);
    return INVERSE ? wd_t'(w <<< 1) : wd_t'(w >>> 2);
  endfunction

  function automatic wd_t postscale(wd_t w);
    return INVERSE ? w : wd_t'(w >>> 1);
  endfunction

  // ---------------- control: frame position and block schedule
  assign load     = (pos == pos_t'(FL - 1));
  assign in_ready = load && (phase == PH_ROWS);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pos <= '0;
    else        pos <= load ? '0 : pos + 1'b1;

  always_comb begin
    tag_new = '0;
    for (int l = 0; l < LANES; l++) load_word[l] = '0;
    unique case (phase)
      PH_ROWS: if (in_valid) begin
        tag_new = '{valid: 1'b1, col: 1'b0, idx: idx};
        for (int l = 0; l < LANES; l++) load_word[l] = prescale(in_data[l]);
      end
      PH_COLS: begin
        tag_new = '{valid: 1'b1, col: 1'b1, idx: idx};
        for (int l = 0; l < LANES; l++) load_word[l] = prescale(ram_col[l]);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      phase     <= PH_ROWS;
      idx       <= '0;
      tag_cur   <= '0;
      tag_prev  <= '0;
      ev_stall  <= 1'b0;
      ev_bubble <= 1'b0;
    end else begin
      ev_stall  <= 1'b0;
      ev_bubble <= 1'b0;
      if (load) begin
        tag_prev <= tag_cur;
        tag_cur  <= tag_new;
        unique case (phase)
          PH_ROWS: if (in_valid) begin
            idx <= idx + 1'b1;
            if (idx == 3'd7) phase <= PH_BUBBLE;
          end else ev_stall <= 1'b1;
          PH_BUBBLE: begin
            phase     <= PH_COLS;
            idx       <= '0;
            ev_bubble <= 1'b1;
          end
          PH_COLS: begin
            idx <= idx + 1'b1;
            if (idx == 3'd7) phase <= PH_ROWS;
          end
          default: phase <= PH_ROWS;
        endcase
      end
    end

  // ---------------- serialiser: guard zeros, then 16 bits LSB first
  for (genvar l = 0; l < LANES; l++) begin : g_ser
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)              sr[l] <= '0;
      else if (load)           sr[l] <= load_word[l];
      else if (pos >= pos_t'(GUARD))   sr[l] <= sr[l] >> 1;
    assign xs[l] = (pos >= pos_t'(GUARD)) ? sr[l][0] : 1'b0;
  end

  // ---------------- 1-D core
  if (INVERSE) begin : g_inv
    inv_bindct #(.WL(WL)) u_core (.clk, .rst_n, .pos, .y(xs), .x(ys));
  end else begin : g_fwd
    fwd_bindct #(.WL(WL)) u_core (.clk, .rst_n, .pos, .x(xs), .y(ys));
  end

  // ---------------- deserialiser
  assign opos = pos_back(pos, LAT, FL);
  assign done = (opos == pos_t'(FL - 1));

  for (genvar l = 0; l < LANES; l++) begin : g_des
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)              acc[l] <= '0;
      else if (opos >= pos_t'(GUARD))  acc[l] <= {ys[l], acc[l][WL-1:1]};
    assign res[l] = postscale(wd_t'({ys[l], acc[l][WL-1:1]}));
  end

  // ---------------- transpose RAM
  transpose_ram #(.N(LANES), .W(WL)) u_ram (
    .clk,
    .we   (done && tag_prev.valid && !tag_prev.col),
    .wrow (tag_prev.idx),
    .wdata(res),
    .rcol (idx),
    .rdata(ram_col)
  );

  // ---------------- output register
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_index <= '0;
      for (int l = 0; l < LANES; l++) out_data[l] <= '0;
    end else begin
      out_valid <= done && tag_prev.valid && tag_prev.col;
      if (done && tag_prev.valid && tag_prev.col) begin
        out_index <= tag_prev.idx;
        out_data  <= res;
      end
    end

  // The last row must be in the RAM before the first column is read.
  property p_ram_order;
    @(posedge clk) disable iff (!rst_n)
      (load && phase == PH_COLS && idx == 3'd0) |-> !(done && tag_prev.valid && !tag_prev.col);
  endproperty
  a_ram_order: assert property (p_ram_order);

endmodule
