// glink_demux: rebuilds one beam crossing from the GLINK frames of one fiber
// and moves it into the beam clock (BCLK) domain.
//
// The fiber side runs on the receiver's recovered clock, FRAMES (4 or 6) times
// the beam clock. The transmitter marks the first frame of every crossing with
// the GLINK flag bit; the fiber side collects FRAMES consecutive data frames
// starting at a flagged frame (frame k lands in bits [k*FRAME_W +: FRAME_W]).
// A flag in the middle of a crossing, or a missing flag, is a phase error: the
// partial crossing is dropped and collection restarts at the next flag, so
// frames of adjacent crossings are never combined.
//
// The finished crossing crosses into BCLK through a 8-entry dual-clock FIFO
// with Gray-coded pointers and two-flop synchronisers (the fiber clock runs on
// a low-skew net, the beam clock on a global buffer, so they are treated as
// unrelated clocks). After reset the BCLK side waits until PRIME crossings are
// stored, then takes one crossing every BCLK tick; the FIFO fill then stays
// near PRIME because both clocks derive from the same beam clock. A read from
// an empty FIFO or a write into a full one sets a sticky error flag.
//
// Timing: a crossing appears on xing_data 4-6 BCLK ticks after its last frame
// (pointer synchronisation plus the PRIME crossings of slack).
// The 4/6 frame counts follow the source description; the flag-based framing,
// the FIFO and its depth are this design's choices.
module glink_demux #(
  parameter int unsigned FRAME_W = 16,
  parameter int unsigned FRAMES  = 6,
  parameter int unsigned PRIME   = 2
) (
  input  logic                       rst_n,
  // fiber (GLINK receiver) side
  input  logic                       fclk,
  input  logic [FRAME_W-1:0]         rx_data,
  input  logic                       rx_flag,   // first frame of a crossing
  input  logic                       rx_dav,    // data word (not idle/control)
  input  logic                       rx_ready,  // receiver locked
  // beam clock side
  input  logic                       bclk,
  input  logic                       err_clear, // clears the sticky flags
  output logic [FRAMES*FRAME_W-1:0]  xing_data,
  output logic                       xing_valid,
  output logic                       phase_err, // sticky: misframed crossing
  output logic                       fifo_err   // sticky: over- or underflow
);
  localparam int unsigned XW   = FRAMES * FRAME_W;
  localparam int unsigned IDXW = $clog2(FRAMES);

  // ---------------- fiber clock domain ----------------
  logic [IDXW-1:0]       idx;
  logic [XW-1:0]         asm_q;
  logic                  wr_en;
  logic                  f_phase_err;  // one-cycle pulse
  logic                  f_ovf;        // one-cycle pulse
  logic [3:0]            wptr_bin, wptr_gray, rptr_gray_f1, rptr_gray_f2;
  logic [XW-1:0]         mem [8];
  logic [3:0]            rptr_bin, rptr_gray_r, wptr_gray_b1, wptr_gray_b2;

  always_ff @(posedge fclk or negedge rst_n) begin
    if (!rst_n) begin
      idx         <= '0;
      asm_q       <= '0;
      wr_en       <= 1'b0;
      f_phase_err <= 1'b0;
    end else begin
      wr_en       <= 1'b0;
      f_phase_err <= 1'b0;
      if (rx_ready && rx_dav) begin
        if (rx_flag) begin
          asm_q[FRAME_W-1:0] <= rx_data;
          idx                <= IDXW'(1);
          if (idx != '0) f_phase_err <= 1'b1;     // flag arrived too early
        end else if (idx == '0) begin
          f_phase_err <= 1'b1;                    // expected a flagged frame
        end else begin
          asm_q[idx*FRAME_W +: FRAME_W] <= rx_data;
          if (idx == IDXW'(FRAMES-1)) begin
            idx   <= '0;
            wr_en <= 1'b1;
          end else begin
            idx <= idx + 1'b1;
          end
        end
      end else if (!rx_ready) begin
        idx <= '0;
      end
    end
  end

  function automatic logic [3:0] bin2gray(logic [3:0] b);
    return b ^ (b >> 1);
  endfunction

  logic full;
  assign full = (wptr_gray == {~rptr_gray_f2[3:2], rptr_gray_f2[1:0]});

  always_ff @(posedge fclk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_bin     <= '0;
      wptr_gray    <= '0;
      rptr_gray_f1 <= '0;
      rptr_gray_f2 <= '0;
      f_ovf        <= 1'b0;
    end else begin
      rptr_gray_f1 <= rptr_gray_r;
      rptr_gray_f2 <= rptr_gray_f1;
      f_ovf        <= 1'b0;
      if (wr_en) begin
        if (full) begin
          f_ovf <= 1'b1;
        end else begin
          wptr_bin  <= wptr_bin + 1'b1;
          wptr_gray <= bin2gray(wptr_bin + 1'b1);
        end
      end
    end
  end

  always_ff @(posedge fclk) begin
    if (wr_en && !full) mem[wptr_bin[2:0]] <= asm_q;
  end

  // error pulses are held in sticky fiber-side flags; err_clear reaches the
  // fiber side as a toggle
  logic       f_perr_st, f_ovf_st, clr_tgl;
  logic [2:0] clr_sync;
  always_ff @(posedge fclk or negedge rst_n) begin
    if (!rst_n) begin
      f_perr_st <= 1'b0;
      f_ovf_st  <= 1'b0;
      clr_sync  <= '0;
    end else begin
      clr_sync <= {clr_sync[1:0], clr_tgl};
      if (clr_sync[2] != clr_sync[1]) begin
        f_perr_st <= 1'b0;
        f_ovf_st  <= 1'b0;
      end else begin
        f_perr_st <= f_perr_st | f_phase_err;
        f_ovf_st  <= f_ovf_st  | f_ovf;
      end
    end
  end

  // ---------------- beam clock domain ----------------
  logic [3:0] wptr_bin_b;
  logic [3:0] level;
  logic       primed;
  logic [1:0] perr_sync, ovf_sync;
  logic       b_unf;

  function automatic logic [3:0] gray2bin(logic [3:0] g);
    return {g[3], ^g[3:2], ^g[3:1], ^g[3:0]};
  endfunction

  assign wptr_bin_b = gray2bin(wptr_gray_b2);
  assign level      = wptr_bin_b - rptr_bin;

  always_ff @(posedge bclk or negedge rst_n) begin
    if (!rst_n) begin
      rptr_bin     <= '0;
      rptr_gray_r  <= '0;
      wptr_gray_b1 <= '0;
      wptr_gray_b2 <= '0;
      primed       <= 1'b0;
      xing_data    <= '0;
      xing_valid   <= 1'b0;
      b_unf        <= 1'b0;
      clr_tgl      <= 1'b0;
      perr_sync    <= '0;
      ovf_sync     <= '0;
    end else begin
      wptr_gray_b1 <= wptr_gray;
      wptr_gray_b2 <= wptr_gray_b1;
      perr_sync    <= {perr_sync[0], f_perr_st};
      ovf_sync     <= {ovf_sync[0],  f_ovf_st};
      xing_valid   <= 1'b0;
      if (err_clear) begin
        clr_tgl <= ~clr_tgl;
        b_unf   <= 1'b0;
      end
      if (!primed) begin
        if (level >= 4'(PRIME)) primed <= 1'b1;
      end else if (level == '0) begin
        b_unf    <= 1'b1;                 // underflow: re-prime
        primed   <= 1'b0;
      end else begin
        xing_data   <= mem[rptr_bin[2:0]];
        xing_valid  <= 1'b1;
        rptr_bin    <= rptr_bin + 1'b1;
        rptr_gray_r <= bin2gray(rptr_bin + 1'b1);
      end
    end
  end

  assign phase_err = perr_sync[1];
  assign fifo_err  = ovf_sync[1] | b_unf;

endmodule
