// can_bfm: time-based CAN bus node for testbenches. It runs on its own
// clock of 16 ticks per bit (BIT_NS per bit) and resynchronises on every
// recessive-to-dominant edge, samples at tick 8, decodes every base frame
// sent by another node into rx_q, acknowledges frames with a good CRC when ack_en is set,
// and sends frames with send(). The bus is wired-AND: the testbench forms
// bus = AND of all tx outputs.
module can_bfm
  import mops_pkg::*;
#(
  parameter int BIT_NS = 8000
) (
  input  logic bus,
  output logic tx
);
  typedef struct packed {
    logic [10:0] id;
    logic [63:0] data;
    logic [3:0]  dlc;
    logic        acked;
    longint      t_ns;
  } frame_t;

  frame_t  rx_q[$];
  logic    ack_en = 1'b1;
  logic    tclk = 1'b0;
  logic    tx_send = 1'b1, tx_ack = 1'b1;
  logic    sending = 1'b0;
  logic    cur_own = 1'b0;   // frame being decoded was sent by this model
  int      phase = 0;
  int      idle_bits = 0;
  int      frames_seen = 0;
  int      errors_seen = 0;
  logic    bus_prev = 1'b1;
  logic    last_ack_seen = 1'b0;

  assign tx = tx_send & tx_ack;

  always #(BIT_NS / 32) tclk = ~tclk;

  // decoder state
  typedef enum {D_IDLE, D_FRAME, D_TAIL, D_ERR} dstate_t;
  dstate_t ds = D_IDLE;
  logic    raw[$];
  int      same = 0;
  logic    lastb = 1'b1;
  logic    stuff_next = 1'b0;
  int      need = 0;
  int      tail = 0;
  logic    crc_ok = 1'b0;
  logic    ack_pending = 1'b0;
  logic    ack_seen = 1'b0;
  frame_t  cur;

  function automatic logic [14:0] crc_of(input logic b[$], input int n);
    logic [14:0] c = '0;
    for (int i = 0; i < n; i++) c = crc15_step(c, b[i]);
    return c;
  endfunction

  task automatic sample_bit(input logic b);
    idle_bits = b ? idle_bits + 1 : 0;
    case (ds)
      D_IDLE: if (!b) begin
        raw.delete(); raw.push_back(1'b0);
        same = 1; lastb = 1'b0; stuff_next = 1'b0; need = 19; ds = D_FRAME; cur_own = sending && !tx;
      end
      D_FRAME: begin
        if (stuff_next) begin
          if (b == lastb) begin ds = D_ERR; errors_seen++; end
          else begin lastb = b; same = 1; stuff_next = 1'b0;
            if (raw.size() == need) begin ds = D_TAIL; tail = 0; end
          end
        end else begin
          raw.push_back(b);
          same = (b == lastb) ? same + 1 : 1; lastb = b;
          stuff_next = (same == 5);
          if (raw.size() == 19) begin
            int dlc, dl;
            dlc = {raw[15], raw[16], raw[17], raw[18]};
            dl  = raw[12] ? 0 : (dlc > 8 ? 8 : dlc);
            need = 19 + 8 * dl + 15;
            if (raw[13]) begin ds = D_ERR; end
          end
          if (raw.size() == need && !stuff_next) begin ds = D_TAIL; tail = 0; end
        end
      end
      D_TAIL: begin
        if (tail == 0) begin
          crc_ok = (crc_of(raw, raw.size()) == 15'd0);
          ack_pending = crc_ok && ack_en && !sending;
        end
        if (tail == 1) ack_seen = !b;
        if (tail == 8) begin
          cur.id = '0; cur.data = '0;
          for (int i = 0; i < 11; i++) cur.id[10 - i] = raw[1 + i];
          cur.dlc = {raw[15], raw[16], raw[17], raw[18]};
          for (int i = 0; i < need - 34; i++) cur.data[63 - i] = raw[19 + i];
          cur.acked = ack_seen;
          cur.t_ns = longint'($time);
          last_ack_seen = ack_seen;
          if (crc_ok && !cur_own) begin rx_q.push_back(cur); frames_seen++; end
          else if (crc_ok) frames_seen++;
          else errors_seen++;
          ds = D_IDLE;
        end
        tail++;
      end
      D_ERR: if (idle_bits >= 11) ds = D_IDLE;
    endcase
  endtask

  always @(posedge tclk) begin
    if (bus_prev && !bus) phase = 1;
    else phase = (phase + 1) % 16;
    bus_prev = bus;
    if (phase == 8) sample_bit(bus);
    if (phase == 0) begin
      tx_ack = !ack_pending ? 1'b1 : 1'b0;
      ack_pending = 1'b0;
    end
  end

  // Send one base data frame; returns whether it was acknowledged.
  task automatic send(input logic [10:0] id, input logic [63:0] data,
                      input logic [3:0] dlc, output logic acked);
    logic b[$];
    logic s[$];
    logic [14:0] c;
    int dl, run;
    logic lb;
    dl = dlc > 8 ? 8 : int'(dlc);
    while (!(ds == D_IDLE && idle_bits >= 11)) @(posedge tclk);
    b.push_back(1'b0);
    for (int i = 10; i >= 0; i--) b.push_back(id[i]);
    b.push_back(1'b0); b.push_back(1'b0); b.push_back(1'b0);
    for (int i = 3; i >= 0; i--) b.push_back(dlc[i]);
    for (int i = 0; i < 8 * dl; i++) b.push_back(data[63 - i]);
    c = crc_of(b, b.size());
    for (int i = 14; i >= 0; i--) b.push_back(c[i]);
    run = 0; lb = 1'b1;
    foreach (b[i]) begin
      s.push_back(b[i]);
      run = (b[i] == lb) ? run + 1 : 1; lb = b[i];
      if (run == 5) begin s.push_back(!lb); lb = !lb; run = 1; end
    end
    for (int i = 0; i < 10; i++) s.push_back(1'b1);  // delimiters and EOF
    s[s.size() - 9] = 1'b1;                          // ACK slot sent recessive
    sending = 1'b1;
    while (phase != 15) @(posedge tclk);
    foreach (s[i]) begin
      @(posedge tclk);
      tx_send = s[i];
      repeat (15) @(posedge tclk);
    end
    tx_send = 1'b1;
    repeat (16 * 2) @(posedge tclk);
    sending = 1'b0;
    acked = last_ack_seen;
  endtask
endmodule
