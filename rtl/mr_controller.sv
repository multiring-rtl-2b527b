// mr_controller: instruction decoder and controller of MultiRing.
//
// Takes one instruction at a time from the host and turns it into the
// control that the processor array and the I/O need in every clock.
//
// Ring position: col_ptr counts the columns passing the ring-memory output
// (the I/O and processor input), modulo COLS. Every instruction starts when
// column 0 is there, so the processor's first/last-column flags line up
// with the map. While no instruction runs the ring keeps circulating with
// a no-operation control word.
//
// Processor instructions (Boolean, resizing, detection) take exactly one
// ring cycle, COLS clocks, and the next instruction may start in the clock
// right after (one instruction per ring cycle).
// mr-IN: for each column the ring stops (adv low) while ROWS bits are
// taken from the host (sin_valid/sin_ready), then advances one clock while
// the I/O loads them into the destination layer.
// mr-OUT: the ring advances one clock while the I/O captures a column of
// the source layer, then stops while ROWS bits are sent
// (sout_valid/sout_ready).
//
// Host handshake: an instruction is taken in a clock where instr_valid and
// instr_ready are both high. The instruction word layout, the handshakes and
// stopping the ring during serial transfers are this design's choices; the
// document only says that the decoder turns host instructions into control
// signals for the I/O and the processor array every cycle.
module mr_controller
  import mr_pkg::*;
#(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  // host instruction port
  input  logic      instr_valid,
  input  mr_instr_t instr,
  output logic      instr_ready,
  output logic      busy,
  // host serial handshakes (data bits go straight to the I/O unit)
  input  logic      sin_valid,
  output logic      sin_ready,
  output logic      sout_valid,
  input  logic      sout_ready,
  // ring and processor control
  output logic      adv,
  output mr_ctl_t   ctl,
  // I/O control
  output layer_t    io_layer,
  output logic      io_load,
  output logic      io_cap,
  output logic      io_shift
);

  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_WAIT, S_RUN, S_IN_SHIFT, S_IN_LOAD, S_OUT_CAP, S_OUT_SHIFT
  } state_e;

  state_e    state, state_nx;
  mr_instr_t ir;
  logic [CW-1:0] col_ptr, col_nx;
  logic [RW-1:0] row_cnt;
  logic          last_col_q;   // mr-OUT: the column being sent is the last
  logic          finish;
  logic          accept;

  function automatic state_e exec_state(mr_op_e op);
    case (op)
      OP_IN:   return S_IN_SHIFT;
      OP_OUT:  return S_OUT_CAP;
      default: return S_RUN;
    endcase
  endfunction

  wire at_last_col = (col_ptr == CW'(COLS - 1));
  wire row_last    = (row_cnt == RW'(ROWS - 1));

  always_comb begin
    adv        = 1'b1;
    sin_ready  = 1'b0;
    sout_valid = 1'b0;
    io_load    = 1'b0;
    io_cap     = 1'b0;
    io_shift   = 1'b0;
    finish     = 1'b0;
    io_layer   = (ir.op == OP_OUT) ? ir.src1 : ir.dest;

    ctl.wr_en     = 1'b0;
    ctl.op        = ir.op;
    ctl.sel_c     = ir.src1;
    ctl.sel_b1    = ir.src1;
    ctl.sel_b2    = ir.src2;
    ctl.dest      = ir.dest;
    ctl.paint     = ir.paint;
    ctl.first_col = (col_ptr == '0);
    ctl.last_col  = at_last_col;

    unique case (state)
      S_IDLE, S_WAIT: ;
      S_RUN: begin
        ctl.wr_en = 1'b1;
        finish    = at_last_col;
      end
      S_IN_SHIFT: begin
        adv       = 1'b0;
        sin_ready = 1'b1;
        io_shift  = sin_valid;
      end
      S_IN_LOAD: begin
        io_load = 1'b1;
        finish  = at_last_col;
      end
      S_OUT_CAP: begin
        io_cap = 1'b1;
      end
      S_OUT_SHIFT: begin
        adv        = 1'b0;
        sout_valid = 1'b1;
        io_shift   = sout_ready;
        finish     = sout_ready && row_last && last_col_q;
      end
      default: ;
    endcase

    instr_ready = (state == S_IDLE) || finish;
    accept      = instr_valid && instr_ready;
    col_nx      = adv ? (at_last_col ? '0 : col_ptr + 1'b1) : col_ptr;
  end

  always_comb begin
    state_nx = state;
    unique case (state)
      S_IDLE:      ;
      S_WAIT:      if (at_last_col) state_nx = exec_state(ir.op);
      S_RUN:       ;
      S_IN_SHIFT:  if (sin_valid && row_last) state_nx = S_IN_LOAD;
      S_IN_LOAD:   state_nx = S_IN_SHIFT;
      S_OUT_CAP:   state_nx = S_OUT_SHIFT;
      S_OUT_SHIFT: if (sout_ready && row_last) state_nx = S_OUT_CAP;
      default:     state_nx = S_IDLE;
    endcase
    if (finish) state_nx = S_IDLE;
    // a new instruction starts at once if column 0 comes next
    if (accept) state_nx = (col_nx == '0) ? exec_state(instr.op) : S_WAIT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      ir         <= '{op: OP_COPY, default: '0};
      col_ptr    <= '0;
      row_cnt    <= '0;
      last_col_q <= 1'b0;
    end else begin
      state   <= state_nx;
      col_ptr <= col_nx;
      if (accept) ir <= instr;
      if (io_shift) row_cnt <= row_last ? '0 : row_cnt + 1'b1;
      if (io_cap) last_col_q <= at_last_col;
    end
  end

  assign busy = (state != S_IDLE);

  // The processor writes back only while the ring moves.
  assert property (@(posedge clk) disable iff (!rst_n) ctl.wr_en |-> adv);
  // A processor instruction covers exactly columns 0 .. COLS-1.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state != S_RUN) ##1 (state == S_RUN) |-> (col_ptr == '0));
  // The host holds an offered instruction until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   instr_valid && !instr_ready |=> instr_valid);

endmodule
