// ofc_pkg: types, constants and helper functions shared by the flow-controlled,
// clock-distributed optical switch system.
//
// Every channel in the system is a 32-bit word stream at one word per cycle of the
// distributed clock (10.3125 Gb/s / 32 = 322 MHz, 3.1 ns per cycle). At that width the
// 3-byte preamble plus the 1-byte start packet delimiter fill exactly one word, so the
// receiver finds a packet within one cycle, and the 43.4 ns inter-packet gap is 14 cycles.
// The numbers 2600 bytes (packet), 14 cycles (gap), 8192 bytes (buffer block) and
// 4096 bytes (Rx buffer) follow the document; the word encodings below are this
// design's own choices.
package ofc_pkg;

  localparam int unsigned W = 32;                  // datapath width, bits
  localparam logic [W-1:0] IDLE_WORD  = 32'hAAAA_AAAA; // "1010..." transitions
  localparam logic [W-1:0] START_WORD = 32'hAAAA_AAAB; // 3 preamble bytes + delimiter
  localparam logic [7:0]   FRAME_TAG  = 8'hFD;         // tag of a frame header word

  // ---------------- Ethernet frame stream (between MAC, switch, buffers) ------------
  // A frame is a run of beats; len (bytes) is valid on every beat of the frame.
  // Destination MAC convention: 02:00:<rack>:<server>:xx:xx, so word 0 of a frame
  // carries the rack in bits [15:8] and the server in bits [7:0].
  typedef struct packed {
    logic [W-1:0] data;
    logic         last;
    logic [15:0]  len;
  } frame_beat_t;

  function automatic logic [15:0] words_of(input logic [15:0] len_bytes);
    return (len_bytes + 16'd3) >> 2;
  endfunction

  function automatic logic [7:0] mac_rack(input logic [W-1:0] word0);
    return word0[15:8];
  endfunction

  function automatic logic [7:0] mac_server(input logic [W-1:0] word0);
    return word0[7:0];
  endfunction

  // ---------------- Label channel words ----------------------------------------------
  typedef enum logic [3:0] {
    L_REQ     = 4'h1,  // ToR -> controller: label request {dest, prio}
    L_RESP    = 4'h2,  // controller -> ToR: label response {port the packet went to}
    L_TS_REQ  = 4'h3,  // ToR -> controller: timestamp T_tx
    L_TS_ECHO = 4'h4,  // controller -> ToR: the same timestamp, echoed
    L_TIME    = 4'h5,  // controller -> ToR: controller time {slot, offset}
    L_IDLE    = 4'hA   // idle: with payload 0xAAAAAAA the line toggles continuously
  } label_type_e;

  typedef struct packed {
    label_type_e typ;
    logic [27:0] payload;
  } label_word_t;

  localparam logic [3:0] PORT_NONE = 4'hF;

  function automatic label_word_t label_idle();
    label_word_t w;
    w.typ = L_IDLE;
    w.payload = 28'hAAA_AAAA;
    return w;
  endfunction

  function automatic label_word_t label_req(input logic [3:0] dest, input logic [3:0] prio);
    label_word_t w;
    w.typ = L_REQ;
    w.payload = {dest, prio, 20'h0};
    return w;
  endfunction

  function automatic label_word_t label_resp(input logic [3:0] port);
    label_word_t w;
    w.typ = L_RESP;
    w.payload = {port, 24'h0};
    return w;
  endfunction

  // ---------------- Slot time ----------------------------------------------------------
  localparam int unsigned OFF_W  = 10;   // slot offset width
  localparam int unsigned SLOT_W = 16;   // slot index width

  // ---------------- CRC-32 (polynomial 0x04C11DB7, MSB first, one word per call) -------
  function automatic logic [31:0] crc32_word(input logic [31:0] crc, input logic [31:0] data);
    logic [31:0] c;
    c = crc;
    for (int i = 31; i >= 0; i--) begin
      if (c[31] ^ data[i]) c = {c[30:0], 1'b0} ^ 32'h04C1_1DB7;
      else                 c = {c[30:0], 1'b0};
    end
    return c;
  endfunction

endpackage
