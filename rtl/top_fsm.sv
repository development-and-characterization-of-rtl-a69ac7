// top_fsm: top-level state machine of the MOPS digital part. It runs the
// initialisation (load the CAN configuration, optionally trim the
// oscillator, send the sign-in message), then waits in Idle until a new
// message, a configuration reload or a watchdog event needs work, delegates
// that work to the CAN node interface and the CANopen block and returns to
// Idle. The chip keeps listening to the bus in every state.
//  - Power-on: load configuration; if auto_trim_en_i, trim (node in
//    listen-only mode) until the trimming control reports 15 frames; sign in.
//  - Remote reset (frame with identifier 0, rank 3): reset the other state
//    machines, reload the configuration, trim again if enabled, sign in.
//  - Watchdog timeout: back to configuration loading and sign-in, never to
//    trimming; a timeout during trimming restores the default trim code.
//  - Configuration reload: rewrite the node registers, no message.
//  - SDO or node guarding request: CANopen block builds the answer, the
//    node interface sends it. A higher-ranked request aborts the current one.
// cur_rank_o tells the prioritizer what is being worked on (0 in Idle,
// 3 while trimming so nothing interrupts it, 2 during start-up so only a
// remote reset does, and the rank of the accepted request while it is
// handled and answered). The Moore outputs are one-clock pulses issued on the
// transition into the state that needs them.
// The states and when trimming happens follow the chip's description; the
// rank values and the one-cycle pulses are this design's own choices.
module top_fsm (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       soft_rst_i,     // watchdog timeout
  input  logic       reload_i,       // configuration reloader
  input  logic       auto_trim_en_i,
  input  logic       new_msg_i,
  input  logic [1:0] new_rank_i,
  input  logic       cfg_done_i,
  input  logic       trim_done_i,
  input  logic       co_done_i,
  input  logic       co_respond_i,
  input  logic       tx_done_i,
  output logic       cfg_load_o,
  output logic       trim_start_o,
  output logic       trim_abort_o,
  output logic       listen_only_o,
  output logic       co_start_o,
  output logic       co_cmd_o,
  output logic       co_abort_o,
  output logic       tx_start_o,
  output logic       tx_abort_o,
  output logic       sm_rst_o,
  output logic [1:0] cur_rank_o,
  output logic       idle_o,
  output logic       remote_reset_o,
  output logic       signin_o
);
  typedef enum logic [2:0] {
    T_CFG, T_TRIM, T_SIGNIN, T_IDLE, T_CO, T_TX, T_RELOAD
  } tstate_t;
  tstate_t state;
  logic    trim_pending;
  logic    signin_pending;
  logic [1:0] job_rank;   // rank of the request being handled in T_CO/T_TX

  assign idle_o        = (state == T_IDLE);
  assign listen_only_o = (state == T_TRIM);

  always_comb begin
    unique case (state)
      T_IDLE:         cur_rank_o = 2'd0;
      T_TRIM:         cur_rank_o = 2'd3;
      T_CFG, T_SIGNIN, T_RELOAD: cur_rank_o = 2'd2;
      default:        cur_rank_o = job_rank;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= T_CFG;
      trim_pending   <= 1'b1;
      signin_pending <= 1'b1;
      job_rank       <= 2'd0;
      cfg_load_o     <= 1'b1;
      trim_start_o   <= 1'b0;
      trim_abort_o   <= 1'b0;
      co_start_o     <= 1'b0;
      co_cmd_o       <= 1'b0;
      co_abort_o     <= 1'b0;
      tx_start_o     <= 1'b0;
      tx_abort_o     <= 1'b0;
      sm_rst_o       <= 1'b0;
      remote_reset_o <= 1'b0;
      signin_o       <= 1'b0;
    end else begin
      cfg_load_o     <= 1'b0;
      trim_start_o   <= 1'b0;
      trim_abort_o   <= 1'b0;
      co_start_o     <= 1'b0;
      co_abort_o     <= 1'b0;
      tx_start_o     <= 1'b0;
      tx_abort_o     <= 1'b0;
      sm_rst_o       <= 1'b0;
      remote_reset_o <= 1'b0;
      signin_o       <= 1'b0;
      if (soft_rst_i) begin
        if (state == T_TRIM) trim_abort_o <= 1'b1;
        state          <= T_CFG;
        trim_pending   <= 1'b0;
        signin_pending <= 1'b1;
        cfg_load_o     <= 1'b1;
      end else if (new_msg_i && new_rank_i == 2'd3) begin
        // remote reset
        state          <= T_CFG;
        trim_pending   <= 1'b1;
        signin_pending <= 1'b1;
        sm_rst_o       <= 1'b1;
        tx_abort_o     <= 1'b1;
        co_abort_o     <= 1'b1;
        remote_reset_o <= 1'b1;
        cfg_load_o     <= 1'b1;
      end else if (new_msg_i && (state == T_IDLE || state == T_CO || state == T_TX)) begin
        // new request (the prioritizer has ranked it above the current one)
        state      <= T_CO;
        co_abort_o <= (state != T_IDLE);
        tx_abort_o <= (state == T_TX);
        co_start_o <= 1'b1;
        co_cmd_o   <= 1'b0;
        job_rank   <= new_rank_i;
      end else begin
        unique case (state)
          T_CFG: if (cfg_done_i) begin
            if (trim_pending && auto_trim_en_i) begin
              state        <= T_TRIM;
              trim_start_o <= 1'b1;
            end else if (signin_pending) begin
              state      <= T_SIGNIN;
              co_start_o <= 1'b1;
              co_cmd_o   <= 1'b1;
              job_rank   <= 2'd2;
            end else begin
              state <= T_IDLE;
            end
            trim_pending <= 1'b0;
          end
          // trim_done_i still shows the previous trim while trim_start_o
          // is high, so it is ignored in that first cycle
          T_TRIM: if (trim_done_i && !trim_start_o) begin
            state      <= T_SIGNIN;
            co_start_o <= 1'b1;
            co_cmd_o   <= 1'b1;
            job_rank   <= 2'd2;
          end
          T_SIGNIN: if (co_done_i) begin
            state      <= T_TX;
            tx_start_o <= 1'b1;
            signin_o   <= 1'b1;
          end
          T_CO: if (co_done_i) begin
            if (co_respond_i) begin
              state      <= T_TX;
              tx_start_o <= 1'b1;
            end else state <= T_IDLE;
          end
          T_TX: if (tx_done_i) begin
            state          <= T_IDLE;
            signin_pending <= 1'b0;
          end
          T_IDLE: if (reload_i) begin
            state      <= T_RELOAD;
            cfg_load_o <= 1'b1;
            sm_rst_o   <= 1'b1;
          end
          T_RELOAD: if (cfg_done_i) state <= T_IDLE;
          default: state <= T_IDLE;
        endcase
      end
    end
  end
endmodule
