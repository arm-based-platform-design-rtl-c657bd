// dbf_core: data flow control unit and datapath of the bus-interleaved deblocking filter.
//
// One macroblock is filtered in four passes: luma horizontal filtering
// (vertical edges), luma vertical filtering (horizontal edges), then the same
// for both chroma components. Each pass is a stream of 4x4 blocks, one word
// (4 pixels) per cycle, through one 1-D filter and two 4x4 pixel arrays, as
// in the document's bus-interleaved architecture:
//   - the word arriving for block b, row i, is the q side of the filter; the
//     p side is row i of Reg1 (pixel_array), which holds the previous block;
//   - the filtered q side goes back into Reg1 (intermediate result for the
//     next edge), the filtered p side is final for this pass and enters Reg2
//     (transpose_array);
//   - Reg2 transposes without stalls: while block k enters it, block k-1
//     leaves as columns. In a horizontal pass these columns are written to
//     the single-ported 96x32 SRAM; in a vertical pass the SRAM is read
//     column-wise and Reg2 turns the filtered columns back into rows, which
//     leave on the output port.
// Horizontal-pass input comes from the bus input port, or, for the current
// macroblock's blocks when cur_from_stream is set, from the reconstruction
// stream of the IQ-IDCT accelerator (the document's non-buffered coupling).
//
// Adaptive transfer: only the blocks that the filtering mode (document
// Table 8/9) needs are transferred, in and out. A block that follows a block
// that is not its neighbour in the pass direction starts a new chain: the
// edge in between is passed through unfiltered. Input order, per pass:
//   luma  H: U0..U3, then per block row r: L_r, B_4r .. B_4r+3
//   luma  V (output order): per column c: U_c, B_c, B_c+4, B_c+8, B_c+12; then L0..L3
//   chroma H, per component (Cb then Cr): T0, T1, L0, C0, C1, L1, C2, C3
//   chroma V (output order), per component: T0, C0, C2, T1, C1, C3, L0, L1
// with absent blocks left out. U/T are the top neighbour's bottom 4x4 blocks,
// L the left neighbour's right 4x4 blocks, B/C the current blocks (raster).
// Every transferred word comes back filtered, so words out = words in.
// The two-stage pipeline (issue, then filter), the block orders above and the
// 10-cycle flush per pass are this design's choices; the document gives the
// dataflow of its Figs. 36-41 and the block sets of Table 9.
//
// Timing: one word per cycle when the input has data and the output room;
// a pass costs (blocks x 4) + 10 cycles, so a macroblock of W words takes 2W + 41 cycles. start is taken when idle; done pulses
// one cycle when the macroblock is finished.
// rst_n is also used in the disable condition of the handshake assertions,
// which lint reports as a reset used both synchronously and asynchronously;
// the flops themselves use it only asynchronously.
module dbf_core
  import dbf_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  // control, sampled on start
  input  logic           start,
  input  dbf_mode_e      mode,
  input  bs_t [3:0][3:0] bs_v,
  input  bs_t [3:0][3:0] bs_h,
  input  qp_t [2:0]      qp_luma,     // {top, left, cur}
  input  qp_t [2:0]      qp_chroma,
  input  logic           cur_from_stream,
  output logic           busy,
  output logic           done,
  // bus input port
  input  logic           in_valid,
  input  pix4_t          in_data,
  output logic           in_ready,
  // reconstruction stream (current macroblock rows)
  input  logic           cur_valid,
  input  pix4_t          cur_data,
  output logic           cur_ready,
  // output port
  input  logic           out_stall,
  output logic           out_valid,
  output pix4_t          out_data,
  // activity, for observation
  output logic           filt_event   // an edge row was actually filtered
);

  typedef enum logic [1:0] {P_LH = 2'd0, P_LV = 2'd1, P_CH = 2'd2, P_CV = 2'd3} pass_e;
  typedef enum logic [2:0] {S_IDLE, S_RUN, S_FLUSH1, S_FLUSH2, S_DRAIN} state_e;

  localparam logic [4:0] NONE = 5'd31;

  // ---------------------------------------------------------------- lists
  function automatic int unsigned list_len(input pass_e p);
    unique case (p)
      P_LH:    return 24;
      P_LV:    return 24;
      default: return 16;
    endcase
  endfunction

  // Block order of each pass (slot numbers: luma 0..15 current, 16..19 top,
  // 20..23 left; chroma 0..3 current, 4..5 top, 6..7 left).
  localparam logic [4:0] ORD_LH [24] = '{16,17,18,19, 20,0,1,2,3, 21,4,5,6,7, 22,8,9,10,11, 23,12,13,14,15};
  localparam logic [4:0] ORD_LV [24] = '{16,0,4,8,12, 17,1,5,9,13, 18,2,6,10,14, 19,3,7,11,15, 20,21,22,23};
  localparam logic [2:0] ORD_CH [8]  = '{4,5,6,0,1,7,2,3};
  localparam logic [2:0] ORD_CV [8]  = '{4,0,2,5,1,3,6,7};

  function automatic logic [4:0] slot_id(input pass_e p, input logic [4:0] k);
    unique case (p)
      P_LH:    return (k < 5'd24) ? ORD_LH[k] : 5'd0;
      P_LV:    return (k < 5'd24) ? ORD_LV[k] : 5'd0;
      P_CH:    return {1'b0, k[3], ORD_CH[k[2:0]]};
      default: return {1'b0, k[3], ORD_CV[k[2:0]]};
    endcase
  endfunction

  // Is block id transferred in this mode (document Table 9)?
  function automatic logic present(input logic chroma, input logic [4:0] id,
                                   input logic l, input logic t, input logic c);
    logic [2:0] cc;
    cc = id[2:0];
    if (!chroma) begin
      if (id < 5'd16) return c || (l && id[1:0] == 2'd0) || (t && id < 5'd4);
      if (id < 5'd20) return t;
      return l;
    end
    if (cc < 3'd4) return c || (l && !cc[0]) || (t && cc < 3'd2);
    if (cc < 3'd6) return t;
    return l;
  endfunction

  // Geometric predecessor of a block in the pass direction (NONE if it starts a chain).
  function automatic logic [4:0] pred_id(input pass_e p, input logic [4:0] id);
    logic [2:0] cc;
    cc = id[2:0];
    unique case (p)
      P_LH: if (id < 5'd16) return (id[1:0] == 2'd0) ? 5'd20 + {3'd0, id[3:2]} : id - 5'd1;
      P_LV: if (id < 5'd16) return (id < 5'd4) ? 5'd16 + {3'd0, id[1:0]} : id - 5'd4;
      P_CH: if (cc < 3'd4) return (!cc[0]) ? {1'b0, id[3], 3'd6 + {2'd0, cc[1]}} : id - 5'd1;
      default: if (cc < 3'd4) return (cc < 3'd2) ? {1'b0, id[3], 3'd4 + {2'd0, cc[0]}} : id - 5'd2;
    endcase
    return NONE;
  endfunction

  // ---------------------------------------------------------------- state
  state_e      state;
  pass_e       pass;
  logic [4:0]  k;          // list index of the current slot
  logic [1:0]  row;        // word index within the slot
  logic [4:0]  prev_id;    // last block issued in this pass (NONE at pass start)
  logic        m_l, m_t, m_c, m_cur_stream;
  bs_t [3:0][3:0] r_bs_v, r_bs_h;
  qp_t [2:0]   r_qpl, r_qpc;

  logic        chroma_pass, h_pass;
  logic [4:0]  cur_id, next_k, first_k_next;
  logic        real_slot, from_cur, src_valid, fire;

  assign chroma_pass = pass[1];
  assign h_pass      = !pass[0];
  assign real_slot   = (state == S_RUN);
  assign cur_id      = slot_id(pass, k);
  assign from_cur    = m_cur_stream && (chroma_pass ? (cur_id[2:0] < 3'd4) : (cur_id < 5'd16));

  function automatic logic [4:0] find_from(input pass_e p, input logic [4:0] from,
                                           input logic l, input logic t, input logic c);
    logic [4:0] r;
    r = NONE;
    for (int n = 24; n >= 0; n--) begin
      if (5'(n) >= from && n < int'(list_len(p)) &&
          present(p[1], slot_id(p, 5'(n)), l, t, c))
        r = 5'(n);
    end
    return r;
  endfunction

  assign next_k       = find_from(pass, k + 5'd1, m_l, m_t, m_c);
  assign first_k_next = find_from(pass_e'(pass + 2'd1), 5'd0, m_l, m_t, m_c);

  always_comb begin
    src_valid = 1'b1;
    if (real_slot && h_pass) src_valid = from_cur ? cur_valid : in_valid;
  end

  // Stage B occupancy, needed before the drain state can end.
  logic b_valid;

  always_comb begin
    fire = 1'b0;
    unique case (state)
      S_RUN, S_FLUSH1, S_FLUSH2: fire = src_valid && (h_pass || !out_stall);
      default:                   fire = 1'b0;
    endcase
  end

  assign in_ready  = fire && real_slot && h_pass && !from_cur;
  assign cur_ready = fire && real_slot && h_pass && from_cur;

  // Edge parameters of the slot being issued.
  bs_t        a_bs;
  qp_t        a_qp;
  logic       a_cont;
  logic [4:0] a_pred;

  always_comb begin
    logic [1:0] bc, br;
    a_pred = pred_id(pass, cur_id);
    a_cont = real_slot && (a_pred != NONE) && (prev_id == a_pred);
    bc = cur_id[1:0];
    br = cur_id[3:2];
    unique case (pass)
      P_LH:    a_bs = r_bs_v[bc][br];
      P_LV:    a_bs = r_bs_h[br][bc];
      P_CH:    a_bs = r_bs_v[{cur_id[0], 1'b0}][{cur_id[1], row[1]}];
      default: a_bs = r_bs_h[{cur_id[1], 1'b0}][{cur_id[0], row[1]}];
    endcase
    if (!a_cont) a_bs = 3'd0;
    // QP of the edge: average with the neighbour macroblock on its boundary
    if (!chroma_pass) begin
      if (a_pred >= 5'd20 && a_pred != NONE) a_qp = qp_t'((7'(r_qpl[1]) + 7'(r_qpl[0]) + 7'd1) >> 1);
      else if (a_pred >= 5'd16 && a_pred != NONE) a_qp = qp_t'((7'(r_qpl[2]) + 7'(r_qpl[0]) + 7'd1) >> 1);
      else a_qp = r_qpl[0];
    end else begin
      if (a_pred != NONE && a_pred[2:0] >= 3'd6) a_qp = qp_t'((7'(r_qpc[1]) + 7'(r_qpc[0]) + 7'd1) >> 1);
      else if (a_pred != NONE && a_pred[2:0] >= 3'd4) a_qp = qp_t'((7'(r_qpc[2]) + 7'(r_qpc[0]) + 7'd1) >> 1);
      else a_qp = r_qpc[0];
    end
  end

  // ---------------------------------------------------------------- stage B registers
  logic       b_dummy, b_h, b_chroma, b_last_row;
  logic [1:0] b_row;
  logic [4:0] b_id;
  bs_t        b_bs;
  qp_t        b_qp;
  pix4_t      b_qword;

  // SRAM
  logic       sram_en, sram_we;
  logic [6:0] sram_addr;
  pix4_t      sram_wdata, sram_rdata;

  // Tags of the blocks held in Reg1 and Reg2
  logic       reg1_v, reg2_v;
  logic [4:0] reg1_id, reg2_id;

  pix4_t reg1_rd, q_word, f_p, f_q, reg2_pop;
  logic  f_done;

  // ---------------------------------------------------------------- control FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      pass    <= P_LH;
      k       <= '0;
      row     <= '0;
      prev_id <= NONE;
      done    <= 1'b0;
      m_l <= 1'b0; m_t <= 1'b0; m_c <= 1'b0; m_cur_stream <= 1'b0;
      r_bs_v <= '0; r_bs_h <= '0; r_qpl <= '0; r_qpc <= '0;
      b_valid <= 1'b0;
      b_dummy <= 1'b0; b_h <= 1'b0; b_chroma <= 1'b0; b_last_row <= 1'b0;
      b_row <= '0; b_id <= '0; b_bs <= '0; b_qp <= '0; b_qword <= '0;
    end else begin
      done <= 1'b0;
      // stage A -> stage B
      b_valid <= fire;
      if (fire) begin
        b_dummy    <= !real_slot;
        b_h        <= h_pass;
        b_chroma   <= chroma_pass;
        b_row      <= row;
        b_last_row <= (row == 2'd3);
        b_id       <= cur_id;
        b_bs       <= a_bs;
        b_qp       <= a_qp;
        b_qword    <= (!real_slot || !h_pass) ? '0 : (from_cur ? cur_data : in_data);
      end
      unique case (state)
        S_IDLE: begin
          if (start) begin
            m_l <= (mode == MODE_1) || (mode == MODE_3) || (mode == MODE_5) || (mode == MODE_7);
            m_t <= (mode == MODE_1) || (mode == MODE_2) || (mode == MODE_5) || (mode == MODE_6);
            m_c <= (mode == MODE_1) || (mode == MODE_2) || (mode == MODE_3) || (mode == MODE_4);
            m_cur_stream <= cur_from_stream;
            r_bs_v <= bs_v; r_bs_h <= bs_h; r_qpl <= qp_luma; r_qpc <= qp_chroma;
            pass    <= P_LH;
            row     <= '0;
            prev_id <= NONE;
            if (mode == MODE_SKIP) begin
              done <= 1'b1;
            end else begin
              // the luma H pass always has a block: U0, L0 or B0
              state <= S_RUN;
              k     <= find_from(P_LH, 5'd0,
                                 (mode == MODE_1) || (mode == MODE_3) || (mode == MODE_5) || (mode == MODE_7),
                                 (mode == MODE_1) || (mode == MODE_2) || (mode == MODE_5) || (mode == MODE_6),
                                 (mode == MODE_1) || (mode == MODE_2) || (mode == MODE_3) || (mode == MODE_4));
            end
          end
        end
        S_RUN, S_FLUSH1, S_FLUSH2: begin
          if (fire) begin
            row <= row + 2'd1;
            if (row == 2'd3) begin
              if (state == S_RUN) begin
                prev_id <= cur_id;
                if (next_k == NONE) state <= S_FLUSH1;
                else                k     <= next_k;
              end else if (state == S_FLUSH1) begin
                state <= S_FLUSH2;
              end else begin
                state <= S_DRAIN;
              end
            end
          end
        end
        S_DRAIN: begin
          // last Reg2 word leaves in stage B this cycle; SRAM port is then free
          if (!b_valid) begin
            prev_id <= NONE;
            if (pass == P_CV) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              pass <= pass_e'(pass + 2'd1);
              if (first_k_next == NONE) state <= S_FLUSH1;
              else begin
                state <= S_RUN;
                k     <= first_k_next;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // ---------------------------------------------------------------- datapath (stage B)
  pixel_array #(.W(32)) u_reg1 (
    .clk, .rst_n,
    .we    (b_valid),
    .idx   (b_row),
    .wdata (f_q),
    .rdata (reg1_rd)
  );

  assign q_word = b_h ? b_qword : (b_dummy ? '0 : sram_rdata);

  edge_filter u_filter (
    .p_in     (reg1_rd),
    .q_in     (q_word),
    .bs       (reg1_v ? b_bs : 3'd0),
    .qp       (b_qp),
    .chroma   (b_chroma),
    .p_out    (f_p),
    .q_out    (f_q),
    .filtered (f_done)
  );

  transpose_array #(.EW(8)) u_reg2 (
    .clk, .rst_n,
    .push      (b_valid),
    .push_idx  (b_row),
    .push_data (f_p),
    .pop_data  (reg2_pop)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg1_v <= 1'b0; reg2_v <= 1'b0; reg1_id <= '0; reg2_id <= '0;
    end else if (b_valid && b_last_row) begin
      reg2_v  <= reg1_v;
      reg2_id <= reg1_id;
      reg1_v  <= !b_dummy;
      reg1_id <= b_id;
    end
  end

  assign filt_event = b_valid && reg1_v && f_done;

  // SRAM: stage B writes Reg2's columns in H passes, stage A reads in V passes.
  always_comb begin
    sram_en    = 1'b0;
    sram_we    = 1'b0;
    sram_addr  = '0;
    sram_wdata = reg2_pop;
    if (b_valid && b_h && reg2_v) begin
      sram_en   = 1'b1;
      sram_we   = 1'b1;
      sram_addr = {reg2_id, b_row};
    end else if (fire && !h_pass && real_slot) begin
      sram_en   = 1'b1;
      sram_addr = {cur_id, row};
    end
  end

  sp_sram #(.DEPTH(96), .WIDTH(32)) u_sram (
    .clk,
    .en    (sram_en),
    .we    (sram_we),
    .addr  (sram_addr),
    .wdata (sram_wdata),
    .rdata (sram_rdata)
  );

  assign out_valid = b_valid && !b_h && reg2_v;
  assign out_data  = reg2_pop;

  // The single SRAM port is never asked for a read and a write in one cycle.
  a_sram_port: assert property (@(posedge clk) disable iff (!rst_n)
    !(b_valid && b_h && reg2_v && fire && !h_pass && real_slot));

endmodule
