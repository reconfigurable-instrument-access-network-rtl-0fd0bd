// fsm_1687 -- main 1687 state machine of the master controller; it takes the
// place of the JTAG TAP controller.
//
// One apply group runs in two phases:
//   configuration phase: SHIFT_CONTROL shifts a sequence that sets the S bit of
//     every SIB to 1 for the instruments named in the SCR and to 0 for all
//     others; UPDATE_CONTROL pulses update_en so the SIBs open or close;
//     CAPTURE pulses capture_en so the newly opened scan registers load their
//     instruments' outputs.
//   data phase: SHIFT_DATA shifts the new scan path once more.  SIB bits are
//     shifted again with their new value so the configuration is kept; each
//     open segment receives host data (iWrite) or zero dummy bits (iRead), and
//     the bits that leave a read segment at tdo are passed to the output
//     discard unit.  UPDATE_DATA pulses update_en so written data reaches the
//     instruments, and RESET_STATE pulses fin and sib_reset, which closes every
//     SIB, and returns to IDLE.
//
// Because every group starts with all SIBs closed, the configuration shift is
// always exactly NUM_INSTR bits long, and its update pulse cannot load any
// instrument (no segment is selected at that moment).
//
// Shift sequence: the bit shifted first ends farthest from tdi, so the data
// phase walks the path from the tdo end: S(N-1), segment N-1 (if open),
// S(N-2), ..., S(0), segment 0 (if open), segment bits least significant
// first.  The segment lengths come from the ILM (ilm_idx/ilm_len).
//
// Handshakes: control_ready (level) starts a group from IDLE; in that clock the
// SCR contents are copied and scr_clear is pulsed.  In a write segment a new
// data byte is needed every 8 bits: the shift stalls until data_valid, and
// data_take acknowledges the byte in the clock its bit 0 is shifted.  When a
// read bit is due and odu_stall is high, the shift stalls as well.  One bit is
// shifted per clock otherwise.  An apply group on a path of P bits therefore
// takes 1 + N + 2 + P + 2 clocks from start to fin without stalls.
//
// The states and their enable outputs follow the reference ASMD chart.  Going
// from CAPTURE straight into SHIFT_DATA and stalling on missing data, instead
// of waiting in IDLE for data_ready, is this design's choice, as are the
// sequence generator and closing the SIBs in RESET_STATE.
module fsm_1687
  import ijtag_pkg::*;
#(
  parameter int unsigned NUM_INSTR = 150,
  localparam int unsigned IW = (NUM_INSTR > 1) ? $clog2(NUM_INSTR) : 1
) (
  input  logic             clk,
  input  logic             rst,          // asynchronous, active high
  // from the interpreter and the SCR
  input  logic             control_ready,
  input  scr_mode_e        scr_modes [NUM_INSTR],
  output logic             scr_clear,
  input  logic             data_valid,
  input  logic [7:0]       data_byte,
  output logic             data_take,
  // ILM read port
  output logic [IW-1:0]    ilm_idx,
  input  logic [LEN_W-1:0] ilm_len,
  // 1687 network
  output logic             tdi,
  input  logic             tdo,
  output logic             shift_en,
  output logic             capture_en,
  output logic             update_en,
  output logic             sib_reset,
  // output discard unit
  output logic             out_valid,
  output logic             out_bit,
  input  logic             odu_stall,
  // status
  output logic             busy,
  output logic             fin           // one-clock pulse at the end of a group
);

  typedef enum logic [2:0] {
    IDLE, SHIFT_CONTROL, UPDATE_CONTROL, CAPTURE,
    SHIFT_DATA, UPDATE_DATA, RESET_STATE
  } state_e;

  localparam logic [IW-1:0] LAST = IW'(NUM_INSTR - 1);

  state_e           state;
  scr_mode_e        mode_q [NUM_INSTR];
  logic [IW-1:0]    k;
  logic             in_seg;
  logic [LEN_W-1:0] b;
  logic [6:0]       byte_sh;

  scr_mode_e cur_mode;
  logic      new_open_k, seg_open_k, write_seg, read_seg, need_byte, stall;
  logic      seg_end, path_end;

  always_comb begin
    cur_mode   = mode_q[k];
    new_open_k = (cur_mode != SCR_OFF);
    seg_open_k = (state == SHIFT_DATA) && new_open_k;
    write_seg  = in_seg && (state == SHIFT_DATA) && (cur_mode == SCR_WRITE);
    read_seg   = in_seg && (state == SHIFT_DATA) && (cur_mode == SCR_READ);
    need_byte  = write_seg && (b[2:0] == 3'd0);
    stall      = (need_byte && !data_valid) || (read_seg && odu_stall);

    shift_en   = (state == SHIFT_CONTROL) || ((state == SHIFT_DATA) && !stall);
    capture_en = (state == CAPTURE);
    update_en  = (state == UPDATE_CONTROL) || (state == UPDATE_DATA);
    sib_reset  = (state == RESET_STATE);

    if (!in_seg)        tdi = new_open_k;
    else if (need_byte) tdi = data_byte[0];
    else if (write_seg) tdi = byte_sh[0];
    else                tdi = 1'b0;          // dummy bits

    data_take = need_byte && data_valid;
    out_valid = read_seg && shift_en;
    out_bit   = tdo;
    scr_clear = (state == IDLE) && control_ready;
    ilm_idx   = k;
    busy      = (state != IDLE);
    fin       = (state == RESET_STATE);

    // last bit of the current segment / of the whole path
    seg_end   = in_seg ? (b == ilm_len - 1'b1) : !seg_open_k;
    path_end  = seg_end && (k == '0);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state   <= IDLE;
      k       <= LAST;
      in_seg  <= 1'b0;
      b       <= '0;
      byte_sh <= '0;
      for (int i = 0; i < NUM_INSTR; i++) mode_q[i] <= SCR_OFF;
    end else begin
      unique case (state)
        IDLE: begin
          if (control_ready) begin
            mode_q <= scr_modes;
            k      <= LAST;
            in_seg <= 1'b0;
            b      <= '0;
            state  <= SHIFT_CONTROL;
          end
        end
        SHIFT_CONTROL, SHIFT_DATA: begin
          if (shift_en) begin
            if (need_byte)      byte_sh <= data_byte[7:1];
            else if (write_seg) byte_sh <= byte_sh >> 1;
            if (seg_end) begin
              in_seg <= 1'b0;
              b      <= '0;
              if (path_end) state <= (state == SHIFT_CONTROL) ? UPDATE_CONTROL : UPDATE_DATA;
              else          k     <= k - 1'b1;
            end else if (!in_seg) begin
              in_seg <= 1'b1;
              b      <= '0;
            end else begin
              b <= b + 1'b1;
            end
          end
        end
        UPDATE_CONTROL: state <= CAPTURE;
        CAPTURE: begin
          k      <= LAST;
          in_seg <= 1'b0;
          b      <= '0;
          state  <= SHIFT_DATA;
        end
        UPDATE_DATA: state <= RESET_STATE;
        RESET_STATE: begin
          k     <= LAST;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Only one of the network enables may be active at a time.
  a_one_enable: assert property (@(posedge clk) disable iff (rst)
    $onehot0({shift_en, capture_en, update_en, sib_reset}));

  // A data byte is only taken when one is offered.
  a_take_valid: assert property (@(posedge clk) disable iff (rst)
    data_take |-> data_valid);

endmodule
