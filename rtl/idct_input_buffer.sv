// idct_input_buffer: two-bank coefficient buffer between inverse
// quantisation and the IDCT.
//
// Write side: a valid/ready stream of four 16-bit coefficients per beat in
// row order (an 8x8 block takes 16 beats, row r = beat/2, columns 4*(beat%2)
// to +3; a 4x4 block takes 4 beats, one row each). The block's MODE is taken
// with its first beat. At the last beat the bank is marked full and the
// block's side information (zero / DC-only flags and DC value, from
// idct_zero_dc_detect) is stored with it; the next block goes to the other
// bank, so one block can be loaded while the previous one is transformed.
// first/fire tell the detector where a block starts.
//
// Read side: avail and the stored mode/flags describe the oldest full bank.
// rd_data is column rd_col of that bank: lanes 0..3 always, lanes 4..7 only
// in the 8x8 modes (zero otherwise). release frees the bank.
//
// An input buffer after inverse quantisation that hands four coefficients
// (and four more in 8x8 mode) to the core follows the source architecture.
// The two banks, the valid/ready stream and the beat order are this design's
// own.
module idct_input_buffer
  import idct_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // from inverse quantisation
  input  logic                   in_valid,
  output logic                   in_ready,
  input  idct_mode_e             in_mode,
  input  logic signed [IN_W-1:0] in_data [4],
  // to the zero/DC detector
  output logic                   fire,
  output logic                   first,
  input  logic                   det_zero,
  input  logic                   det_dc_only,
  input  logic signed [IN_W-1:0] det_dc,
  // to the transform
  output logic                   avail,
  output idct_mode_e             blk_mode,
  output logic                   blk_zero,
  output logic                   blk_dc_only,
  output logic signed [IN_W-1:0] blk_dc,
  input  logic [2:0]             rd_col,
  output logic signed [IN_W-1:0] rd_data [8],
  input  logic                   release_bank
);

  logic signed [IN_W-1:0] mem [2][8][8];
  logic [1:0]             full;
  idct_mode_e             mode_q [2];
  logic [1:0]             zero_q, dc_only_q;
  logic signed [IN_W-1:0] dc_q [2];
  logic                   wb, rb;
  logic [3:0]             beat;
  idct_mode_e             wmode_q, wmode;
  logic                   last;

  assign in_ready = !full[wb];
  assign fire     = in_valid && in_ready;
  assign first    = (beat == 4'd0);
  assign wmode    = first ? in_mode : wmode_q;
  assign last     = is_8x8(wmode) ? (beat == 4'd15) : (beat == 4'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full    <= '0;
      wb      <= 1'b0;
      rb      <= 1'b0;
      beat    <= '0;
      wmode_q <= MODE_MPEG2;
    end else begin
      if (fire) begin
        wmode_q <= wmode;
        beat    <= last ? 4'd0 : beat + 4'd1;
        if (last) begin
          full[wb] <= 1'b1;
          wb       <= ~wb;
        end
      end
      if (release_bank && full[rb]) begin
        full[rb] <= 1'b0;
        rb       <= ~rb;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fire) begin
      for (int l = 0; l < 4; l++) begin
        if (is_8x8(wmode)) mem[wb][beat[3:1]][{beat[0], 2'(l)}] <= in_data[l];
        else               mem[wb][3'(beat)][3'(l)]            <= in_data[l];
      end
      if (last) begin
        mode_q[wb]    <= wmode;
        zero_q[wb]    <= det_zero;
        dc_only_q[wb] <= det_dc_only;
        dc_q[wb]      <= det_dc;
      end
    end
  end

  assign avail       = full[rb];
  assign blk_mode    = mode_q[rb];
  assign blk_zero    = zero_q[rb];
  assign blk_dc_only = dc_only_q[rb];
  assign blk_dc      = dc_q[rb];

  always_comb begin
    for (int r = 0; r < 8; r++)
      rd_data[r] = (r < 4 || is_8x8(blk_mode)) ? mem[rb][r][rd_col] : '0;
  end

endmodule
