// wm_ctrl: operation sequencer of the watermarking co-processor.
//
// Runs one operation at a time over the block buffers, steering the shared
// DCT/IDCT core and the embedder:
//   OP_DCT       core forward,  A -> OUT
//   OP_IDCT      core inverse,  A -> OUT
//   OP_EMBED     embedder,      A (cover coefficients), B (watermark) -> OUT
//   OP_WATERMARK the whole processing chain of the algorithm:
//                forward A -> C1, forward B -> C2, embed C1,C2 -> C1,
//                inverse C1 -> OUT with the pixels clamped to 0..255.
// The document sends the host image and the watermark through the DCT, adds
// them with the embedding weights and sends the sum through the inverse
// DCT; the split into these four operations, the buffer names and the
// clamp are this design's choices.
//
// Interface: start is a one-cycle request carrying op; it is accepted only
// while idle and op is one of the four codes, otherwise rejected pulses.
// busy is high from the cycle after an accepted start until done pulses.
// Each core phase is launched by a one-cycle core_start and ends on
// core_done; each embed phase issues indices 0..63 on emb_valid/emb_idx,
// one per cycle, and ends when emb_last is reported (the embedder's result
// for index 63). cycles holds the length of the last operation: the number
// of clock edges from the start cycle to the done cycle.
module wm_ctrl
  import wm_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  wm_op_e           op,
  output logic             busy,
  output logic             done,
  output logic             rejected,
  output logic [31:0]      cycles,
  // DCT/IDCT core
  output logic             core_start,
  output logic             core_inverse,
  output wm_src_e          core_src,
  output wm_dst_e          core_dst,
  output logic             clamp,
  input  logic             core_done,
  // embedder
  output logic             emb_valid,
  output logic [IDX_W-1:0] emb_idx,
  output logic             emb_from_coef,   // 1: read C1/C2, 0: read A/B
  output wm_dst_e          emb_dst,
  input  logic             emb_last
);

  typedef enum logic [2:0] {
    S_IDLE, S_DCT, S_IDCT, S_EMB, S_WM_DCT_COV, S_WM_DCT_WM, S_WM_EMB, S_WM_IDCT
  } state_e;

  state_e state, state_next;
  logic   phase_end;
  logic   emb_issuing;
  logic [31:0] cyc_cnt;

  function automatic logic is_core_state(state_e s);
    return s inside {S_DCT, S_IDCT, S_WM_DCT_COV, S_WM_DCT_WM, S_WM_IDCT};
  endfunction
  function automatic logic is_emb_state(state_e s);
    return s inside {S_EMB, S_WM_EMB};
  endfunction

  assign phase_end = is_core_state(state) ? core_done :
                     is_emb_state(state)  ? emb_last  : 1'b0;

  always_comb begin
    state_next = state;
    rejected   = 1'b0;
    case (state)
      S_IDLE: if (start) begin
        case (op)
          OP_DCT:       state_next = S_DCT;
          OP_IDCT:      state_next = S_IDCT;
          OP_EMBED:     state_next = S_EMB;
          OP_WATERMARK: state_next = S_WM_DCT_COV;
          default:      rejected   = 1'b1;
        endcase
      end
      S_WM_DCT_COV: if (phase_end) state_next = S_WM_DCT_WM;
      S_WM_DCT_WM:  if (phase_end) state_next = S_WM_EMB;
      S_WM_EMB:     if (phase_end) state_next = S_WM_IDCT;
      default:      if (phase_end) state_next = S_IDLE;
    endcase
    if (state != S_IDLE && start) rejected = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      core_start  <= 1'b0;
      emb_issuing <= 1'b0;
      emb_idx     <= '0;
      done        <= 1'b0;
      cyc_cnt     <= '0;
      cycles      <= '0;
    end else begin
      state      <= state_next;
      core_start <= state_next != state && is_core_state(state_next);
      done       <= state != S_IDLE && state_next == S_IDLE;
      if (state_next != state && is_emb_state(state_next)) begin
        emb_issuing <= 1'b1;
        emb_idx     <= '0;
      end else if (emb_issuing) begin
        emb_idx <= emb_idx + 1'b1;
        if (emb_idx == IDX_W'(BLK_SIZE - 1)) emb_issuing <= 1'b0;
      end
      if (state == S_IDLE) cyc_cnt <= 32'd1;
      else                 cyc_cnt <= cyc_cnt + 1'b1;
      if (state != S_IDLE && state_next == S_IDLE) cycles <= cyc_cnt + 1'b1;
    end
  end

  assign busy      = state != S_IDLE;
  assign emb_valid = emb_issuing;

  always_comb begin
    core_inverse  = state inside {S_IDCT, S_WM_IDCT};
    core_src      = state == S_WM_DCT_WM ? SRC_B : state == S_WM_IDCT ? SRC_C1 : SRC_A;
    core_dst      = state == S_WM_DCT_COV ? DST_C1 : state == S_WM_DCT_WM ? DST_C2 : DST_OUT;
    clamp         = state == S_WM_IDCT;
    emb_from_coef = state == S_WM_EMB;
    emb_dst       = state == S_WM_EMB ? DST_C1 : DST_OUT;
  end

endmodule
