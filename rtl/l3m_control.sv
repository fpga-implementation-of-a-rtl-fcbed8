// l3m_control: control unit of the L3M router.
//
// It takes byte-wide commands from the host, sequences the cell array through
// cleanup, expansion and backtrace, and returns bytes to the host. Its
// datapath is that of the published L3M control unit: up/down
// counters x1/y1/z1, registers x2/y2/z2, three equality comparators, the
// sel_same_pt multiplexers in front of the decoders, the layer counter with
// its selection logic (l3m_layer_sel), the xcount/tcount cycle counters and
// the output multiplexer.
//
// ROUTE sx sy sz tx ty tz:
//   * the source goes into both counter and register sets, then one full
//     layer rotation of CLEAR with nothing selected removes old labels
//     (cleanup) and SET marks the source cell (on the cycle its layer is
//     processed);
//   * the target goes into x1/y1/z1; EXPAND is broadcast with the target
//     selected until STATUS[0] goes low (target reached) or STATUS[1] stays
//     high for NL+1 cycles in a row (no cell could expand: reply XFAIL).
//     NL+1, not NL: a step upward takes NL+1 cycles because the flag of the
//     layer below is registered;
//   * backtrace: TRACE is applied to the cell at x1/y1/z1 on the cycle its
//     layer is processed; the state code on STATUS says which counter to step.
//     With USE_VP, a horizontal step drives PFV low in that same cycle so the
//     layer is processed again next cycle (one cycle per horizontal step).
//     The trace ends when x1/y1/z1 equals x2/y2/z2; a code that is not an
//     expanded state replies TFAIL.
//   * reply: the target, every corner and the source as x,y,z byte triples,
//     then SUCCESS. While a reply byte waits for the host, PFV is held low,
//     which freezes the array, so tcount does not depend on the host.
// SELECT x1 y1 z1 x2 y2 z2 loads a region; CLEAR, SET and EXPAND apply that
// cell command to the region for one rotation of NL cycles; CLEARX applies
// CLEAR with nothing selected (cells only drop expansion labels); TRACE traces
// the point x1/y1/z1 and replies with the 3-bit code; GET_XCOUNT/GET_TCOUNT
// reply with a 16-bit counter, high byte first.
//
// During EXPAND the PF lines carry pf_in[] of the layer being processed, so
// each layer can prefer horizontal or vertical wiring (all ones: no
// preference). Host link: rx_valid/rx_ready and tx_valid/tx_ready, a byte moves when both
// are high. After reset the unit spends NL cycles clearing every cell, then
// accepts commands. Opcodes, reply codes, byte order and the reply layout are
// this design's choice; the command set and the datapath follow the published design.
// The status bus and its combinational use for PFV follow the published
// description of the backtrace speed-up.
module l3m_control
  import l3m_pkg::*;
#(
  parameter int unsigned NX     = 8,
  parameter int unsigned NY     = 8,
  parameter int unsigned NL     = 4,
  parameter bit          USE_VP = 1'b1,  // use PFV to shorten horizontal backtrace steps
  parameter int unsigned CW     = 16,    // cycle counter width
  parameter int unsigned XW     = (NX > 1) ? $clog2(NX) : 1,
  parameter int unsigned YW     = (NY > 1) ? $clog2(NY) : 1,
  parameter int unsigned ZW     = (NL > 1) ? $clog2(NL) : 1
) (
  input  logic          clk,
  input  logic          rst,
  // host byte link
  input  logic [7:0]    rx_data,
  input  logic          rx_valid,
  output logic          rx_ready,
  output logic [7:0]    tx_data,
  output logic          tx_valid,
  input  logic          tx_ready,
  input  logic [1:0]    pf_in [NL], // per-layer {east-west, north-south} expansion enables
  // to and from the cell array
  output cell_cmd_t     cmd,
  output logic [1:0]    pf,
  output logic          pfv,
  output logic          ntop,
  output logic          lsel,
  output logic [XW-1:0] col_a1,
  output logic [XW-1:0] col_a2,
  output logic [YW-1:0] row_a1,
  output logic [YW-1:0] row_a2,
  input  logic [2:0]    status
);

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_R_ARG, S_R_CLEAN, S_R_SET, S_R_EXPAND, S_R_TRACE,
    S_R_MOVE, S_EMIT, S_CODE, S_SEL_ARG, S_APPLY, S_DBG_TRACE, S_CNT_HI,
    S_CNT_LO
  } state_t;

  state_t        state, ret_q;
  logic [XW-1:0] x1, x2;
  logic [YW-1:0] y1, y2;
  logic [ZW-1:0] z1, z2;
  logic [CW-1:0] xcount, tcount, cnt_q;
  logic [2:0]    argi;
  logic [1:0]    emit_idx;
  logic [ZW:0]   cyc;          // cycle counter for one layer rotation
  logic [ZW:0]   idle_cnt;     // consecutive cycles with no cell expanding
  cell_cmd_t     op_q;
  logic          op_nosel;
  cell_state_t   dir_q;
  logic          first_step;
  logic [7:0]    code_q;

  logic          same_pt, sel_en;
  logic [ZW-1:0] cur_layer;
  logic          range_start, range_last, in_range;
  logic          at_src;
  cell_state_t   code;

  l3m_layer_sel #(.NL(NL), .ZW(ZW)) u_layer (
    .clk(clk), .clr(rst), .en(pfv), .same_pt(same_pt), .z1(z1), .z2(z2),
    .cur_layer(cur_layer), .ntop(ntop), .range_start(range_start),
    .range_last(range_last), .in_range(in_range)
  );

  assign at_src = (x1 == x2) && (y1 == y2) && (z1 == z2);
  assign code   = cell_state_t'(status);
  assign col_a1 = x1;
  assign col_a2 = same_pt ? x1 : x2;
  assign row_a1 = y1;
  assign row_a2 = same_pt ? y1 : y2;
  assign lsel   = sel_en && in_range;

  // Control outputs (Moore, apart from PFV during a backtrace hit).
  always_comb begin
    cmd      = CMD_SET;   // with nothing selected SET leaves every cell alone
    sel_en   = 1'b0;
    same_pt  = 1'b0;
    pf       = 2'b11;
    pfv      = 1'b1;
    rx_ready = 1'b0;
    tx_valid = 1'b0;
    tx_data  = code_q;
    unique case (state)
      S_INIT:      begin cmd = CMD_CLEAR; sel_en = 1'b1; end
      S_IDLE, S_R_ARG, S_SEL_ARG: rx_ready = 1'b1;
      S_R_CLEAN:   cmd = CMD_CLEAR;
      S_R_SET:     begin cmd = CMD_SET; sel_en = 1'b1; same_pt = 1'b1; end
      S_R_EXPAND:  begin cmd = CMD_EXPAND; sel_en = 1'b1; same_pt = 1'b1; pf = pf_in[cur_layer]; end
      S_R_TRACE: begin
        cmd = CMD_TRACE; sel_en = 1'b1; same_pt = 1'b1;
        if (USE_VP && range_start && !at_src && is_horizontal(code)) pfv = 1'b0;
      end
      S_R_MOVE:    pfv = 1'b0;
      S_EMIT: begin
        pfv      = 1'b0;
        tx_valid = 1'b1;
        unique case (emit_idx)
          2'd0:    tx_data = 8'(x1);
          2'd1:    tx_data = 8'(y1);
          default: tx_data = 8'(z1);
        endcase
      end
      S_CODE:      tx_valid = 1'b1;
      S_APPLY:     begin cmd = op_q; sel_en = !op_nosel; pf = pf_in[cur_layer]; end
      S_DBG_TRACE: begin cmd = CMD_TRACE; sel_en = 1'b1; same_pt = 1'b1; end
      S_CNT_HI:    begin tx_valid = 1'b1; tx_data = 8'(cnt_q >> 8); end
      S_CNT_LO:    begin tx_valid = 1'b1; tx_data = 8'(cnt_q); end
      default: ;
    endcase
  end

  // Next backtrace coordinate: one step against the direction the traced
  // cell was expanded in (S_R_MOVE uses the stored code).
  cell_state_t   mv_dir;
  logic [XW-1:0] nx;
  logic [YW-1:0] ny;
  logic [ZW-1:0] nz;

  always_comb begin
    mv_dir = (state == S_R_MOVE) ? dir_q : code;
    nx = x1; ny = y1; nz = z1;
    unique case (mv_dir)
      ST_XE:   nx = x1 - 1'b1;
      ST_XW:   nx = x1 + 1'b1;
      ST_XN:   ny = y1 + 1'b1;
      ST_XS:   ny = y1 - 1'b1;
      ST_XU:   nz = z1 + 1'b1;
      ST_XD:   nz = z1 - 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_INIT;
      ret_q      <= S_IDLE;
      x1 <= '0; y1 <= '0; z1 <= '0;
      x2 <= XW'(NX - 1); y2 <= YW'(NY - 1); z2 <= ZW'(NL - 1);
      xcount     <= '0;
      tcount     <= '0;
      cnt_q      <= '0;
      argi       <= '0;
      emit_idx   <= '0;
      cyc        <= '0;
      idle_cnt   <= '0;
      op_q       <= CMD_CLEAR;
      op_nosel   <= 1'b0;
      dir_q      <= ST_E;
      first_step <= 1'b1;
      code_q     <= '0;
    end else begin
      unique case (state)
        S_INIT: begin
          cyc <= cyc + 1'b1;
          if (cyc == (ZW+1)'(NL - 1)) begin
            cyc   <= '0;
            state <= S_IDLE;
          end
        end

        S_IDLE: if (rx_valid) begin
          argi     <= '0;
          cyc      <= '0;
          op_nosel <= 1'b0;
          unique case (rx_data)
            OP_ROUTE: begin
              xcount <= '0;
              tcount <= '0;
              state  <= S_R_ARG;
            end
            OP_SELECT:     state <= S_SEL_ARG;
            OP_CLEAR:      begin op_q <= CMD_CLEAR;  state <= S_APPLY; end
            OP_CLEARX:     begin op_q <= CMD_CLEAR;  op_nosel <= 1'b1; state <= S_APPLY; end
            OP_EXPAND:     begin op_q <= CMD_EXPAND; state <= S_APPLY; end
            OP_SET:        begin op_q <= CMD_SET;    state <= S_APPLY; end
            OP_TRACE:      state <= S_DBG_TRACE;
            OP_GET_XCOUNT: begin cnt_q <= xcount; state <= S_CNT_HI; end
            OP_GET_TCOUNT: begin cnt_q <= tcount; state <= S_CNT_HI; end
            default: ;
          endcase
        end

        S_R_ARG: if (rx_valid) begin
          argi <= argi + 1'b1;
          unique case (argi)
            3'd0: begin x1 <= XW'(rx_data); x2 <= XW'(rx_data); end
            3'd1: begin y1 <= YW'(rx_data); y2 <= YW'(rx_data); end
            3'd2: begin
              z1 <= ZW'(rx_data); z2 <= ZW'(rx_data);
              cyc   <= '0;
              state <= S_R_CLEAN;
            end
            3'd3: x1 <= XW'(rx_data);
            3'd4: y1 <= YW'(rx_data);
            default: begin
              z1       <= ZW'(rx_data);
              idle_cnt <= '0;
              state    <= S_R_EXPAND;
            end
          endcase
        end

        S_R_CLEAN: begin
          cyc <= cyc + 1'b1;
          if (cyc == (ZW+1)'(NL - 1)) state <= S_R_SET;
        end

        S_R_SET: if (range_start) state <= S_R_ARG;

        S_R_EXPAND: begin
          xcount <= xcount + 1'b1;
          if (!status[0]) begin
            first_step <= 1'b1;
            emit_idx   <= '0;
            ret_q      <= S_R_TRACE;
            state      <= S_EMIT;
          end else if (!status[1]) begin
            idle_cnt <= '0;
          end else if (idle_cnt == (ZW+1)'(NL)) begin
            code_q <= RC_XFAIL;
            state  <= S_CODE;
          end else begin
            idle_cnt <= idle_cnt + 1'b1;
          end
        end

        S_R_TRACE: begin
          tcount <= tcount + 1'b1;
          if (range_start) begin
            if (at_src) begin
              code_q   <= RC_SUCCESS;
              emit_idx <= '0;
              ret_q    <= S_CODE;
              state    <= S_EMIT;
            end else if (!is_expanded(code)) begin
              code_q <= RC_TFAIL;
              state  <= S_CODE;
            end else begin
              dir_q      <= code;
              first_step <= 1'b0;
              if (!first_step && code != dir_q) begin
                emit_idx <= '0;
                ret_q    <= S_R_MOVE;
                state    <= S_EMIT;
              end else begin
                x1 <= nx; y1 <= ny; z1 <= nz;
              end
            end
          end
        end

        S_R_MOVE: begin
          x1 <= nx; y1 <= ny; z1 <= nz;
          state <= S_R_TRACE;
        end

        S_EMIT: if (tx_ready) begin
          emit_idx <= emit_idx + 1'b1;
          if (emit_idx == 2'd2) state <= ret_q;
        end

        S_CODE: if (tx_ready) state <= S_IDLE;

        S_SEL_ARG: if (rx_valid) begin
          argi <= argi + 1'b1;
          unique case (argi)
            3'd0: x1 <= XW'(rx_data);
            3'd1: y1 <= YW'(rx_data);
            3'd2: z1 <= ZW'(rx_data);
            3'd3: x2 <= XW'(rx_data);
            3'd4: y2 <= YW'(rx_data);
            default: begin
              z2    <= ZW'(rx_data);
              state <= S_IDLE;
            end
          endcase
        end

        S_APPLY: begin
          cyc <= cyc + 1'b1;
          if (cyc == (ZW+1)'(NL - 1)) state <= S_IDLE;
        end

        S_DBG_TRACE: if (range_start) begin
          code_q <= {5'b0, status};
          state  <= S_CODE;
        end

        S_CNT_HI: if (tx_ready) state <= S_CNT_LO;
        S_CNT_LO: if (tx_ready) state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

  // A reply byte, once offered, stays until the host takes it.
  a_tx_hold: assert property (@(posedge clk) disable iff (rst)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));

endmodule
