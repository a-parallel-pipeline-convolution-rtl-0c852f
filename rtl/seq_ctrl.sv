// seq_ctrl: frame sequencer of the resampling module.
//
// A frame is processed slice by slice away from the base plane. The slices
// fall into segments of constant resolution level L (level_select): segment
// L covers the original slices k with k0*(2**L - 1) <= k < k0*(2**(L+1) - 1).
// For each segment the sequencer
//   1. fixes L, V' = V/2**L and the delays V'/NP (j-delay and left folding
//      delay) and V'^2/NP (k-delay), and pulses clr to restart the variable
//      delays;
//   2. streams the level-L slices k'_a..k'_b that the segment's windows need
//      (one slice on either side of the centre slices, clipped to the
//      volume): for every slice and row, slots 0..V'/NP-1, one slot per
//      cycle. In a slot all NP memory modules are read at the same index,
//      which by the skewed layout is simply a counter running from
//      k'_a * V'^2/NP upward (document section 4.6, Fig. 6);
//   3. waits for the resampler to drain (its latency) before the next
//      segment, because the delays change length with the level.
// The segment and flush organisation is this design's own: the document
// states the per-level delay lengths and the skewed order but not how level
// changes are sequenced.
//
// Interface: `start` (in IDLE) begins a frame with the frame parameters
// persp/k0 held stable; `frame_done` pulses when it is finished. Stream
// outputs (s_*) describe the slot whose memory index is `raddr` this cycle.
module seq_ctrl
  import ppc_pkg::*;
#(
  parameter int unsigned NP   = 4,
  parameter int unsigned V    = 256,
  parameter int unsigned TAPS = 3,
  parameter int unsigned KW   = 16,
  parameter int unsigned LMAX = $clog2(V / NP)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic                           persp,
  input  logic [KW-1:0]                  k0,
  output logic                           busy,
  output logic                           frame_done,
  output logic                           clr,
  output logic [LVL_W-1:0]               lvl,
  output logic [$clog2(V/NP+1)-1:0]      vdiv,
  output logic [$clog2(V*V/NP+1)-1:0]    vsq,
  output logic                           s_valid,
  output logic [CRD_W-1:0]               s_slot,
  output logic [CRD_W-1:0]               s_j,
  output logic [CRD_W-1:0]               s_k,
  output logic [CRD_W-1:0]               s_klast,
  output logic [$clog2(V*V*V/NP)-1:0]    raddr
);
  localparam int unsigned LV  = $clog2(V);
  localparam int unsigned IPW = $clog2(V*V*V/NP);
  localparam int unsigned FW  = $clog2(V*V/NP*(TAPS-1) + V/NP*(TAPS-1) + 3*TAPS + 8);
  localparam int unsigned TW  = KW + LMAX + 2;

  typedef enum logic [1:0] {S_IDLE, S_SEG, S_RUN, S_FLUSH} state_e;
  state_e state;

  logic [CRD_W:0]      kcur;       // first original slice of the next segment
  logic [LVL_W-1:0]    l_sel;
  logic [TW-1:0]       k_next;
  logic [CRD_W:0]      khi;
  logic [CRD_W-1:0]    vp;         // V' - 1 of the current segment
  logic [FW-1:0]       fcnt;

  level_select #(.V(V), .NP(NP), .LMAX(LMAX), .KW(KW)) u_lvl (
    .persp, .k0, .k(CRD_W'(kcur)), .lvl(l_sel), .k_next
  );

  always_comb begin
    khi = (k_next < TW'(V)) ? (CRD_W+1)'(k_next) : (CRD_W+1)'(V);
  end

  assign busy    = (state != S_IDLE);
  assign s_valid = (state == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      kcur       <= '0;
      lvl        <= '0;
      vdiv       <= '0;
      vsq        <= '0;
      vp         <= '0;
      s_slot     <= '0;
      s_j        <= '0;
      s_k        <= '0;
      s_klast    <= '0;
      raddr      <= '0;
      fcnt       <= '0;
      clr        <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      clr        <= 1'b0;
      frame_done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          kcur  <= '0;
          state <= S_SEG;
        end
        S_SEG: begin
          // centre slices (level units) of this segment, plus one each side
          logic [CRD_W-1:0] clo, chi, ka, kb, vpm1;
          clo  = CRD_W'(kcur >> l_sel);
          chi  = CRD_W'((khi - 1'b1) >> l_sel);
          vpm1 = CRD_W'((V >> l_sel) - 1);
          ka   = (clo == 0) ? '0 : clo - 1'b1;
          kb   = (chi + 1'b1 > vpm1) ? vpm1 : chi + 1'b1;
          lvl     <= l_sel;
          vdiv    <= $bits(vdiv)'((V >> l_sel) / NP);
          vsq     <= $bits(vsq)'(((V >> l_sel) * (V >> l_sel)) / NP);
          vp      <= vpm1;
          s_slot  <= '0;
          s_j     <= '0;
          s_k     <= ka;
          s_klast <= kb;
          raddr   <= IPW'(((IPW+LV)'(ka) << (2 * (LV - int'(l_sel)))) / (IPW+LV)'(NP));
          kcur    <= khi;
          clr     <= 1'b1;
          state   <= S_RUN;
        end
        S_RUN: begin
          raddr <= raddr + 1'b1;
          if (s_slot == CRD_W'(vdiv - 1'b1)) begin
            s_slot <= '0;
            if (s_j == vp) begin
              s_j <= '0;
              if (s_k == s_klast) begin
                state <= S_FLUSH;
                fcnt  <= FW'(3 * TAPS + 4) + FW'((TAPS - 1) * (int'(vdiv) + int'(vsq)));
              end else begin
                s_k <= s_k + 1'b1;
              end
            end else begin
              s_j <= s_j + 1'b1;
            end
          end else begin
            s_slot <= s_slot + 1'b1;
          end
        end
        S_FLUSH: begin
          if (fcnt == 0) begin
            if (kcur >= (CRD_W+1)'(V)) begin
              frame_done <= 1'b1;
              state      <= S_IDLE;
            end else begin
              state <= S_SEG;
            end
          end else begin
            fcnt <= fcnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
