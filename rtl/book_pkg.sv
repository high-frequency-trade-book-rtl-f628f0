// Shared types and constants of the bid-side book builder.
//
// entry_t is one stored order: order id, quantity and price packed into
// 128 bits with the order id in the most significant word, which is how a
// memory row reads in a waveform viewer (id | quantity | price).
//
// A request to an order book is one-hot on three bits: ADD = 3'b100,
// DELETE = 3'b010, DECREASE = 3'b001. The parser's 12-bit stock_activate
// word is four of these groups, stock 1 in bits [11:9] down to stock 4 in
// bits [2:0].
//
// The message offsets follow the 40-byte incoming message layout: message
// type at byte 0, timestamp 1..8, order reference 9..12, transaction id
// 13..16, order book id 17..20, side 21, quantity 22..25, price 26..33,
// yield 34..37, bytes 38..39 unused. Multi-byte fields are big-endian.
package book_pkg;

  typedef struct packed {
    logic [31:0] order_id;
    logic [31:0] quantity;
    logic [63:0] price;
  } entry_t;

  localparam logic [2:0] REQ_ADD      = 3'b100;
  localparam logic [2:0] REQ_DELETE   = 3'b010;
  localparam logic [2:0] REQ_DECREASE = 3'b001;

  localparam int NUM_STOCKS = 4;
  localparam int MSG_BYTES  = 40;

  localparam int OFF_MSG_TYPE  = 0;
  localparam int OFF_TIMESTAMP = 1;
  localparam int OFF_ORDER_REF = 9;
  localparam int OFF_TRANS_ID  = 13;
  localparam int OFF_BOOK_ID   = 17;
  localparam int OFF_SIDE      = 21;
  localparam int OFF_QUANTITY  = 22;
  localparam int OFF_PRICE     = 26;
  localparam int OFF_YIELD     = 34;

  // Message type codes: 'A' add order, 'D' order delete, 'X' order cancel
  // (partial quantity reduction).
  localparam logic [7:0] MSG_ADD      = 8'h41;
  localparam logic [7:0] MSG_DELETE   = 8'h44;
  localparam logic [7:0] MSG_DECREASE = 8'h58;
  localparam logic [7:0] SIDE_BUY     = 8'h42;

  // Register addresses of the bus slave.
  localparam logic [5:0] ADDR_BUFFER_NOT_EMPTY = 6'd40;
  localparam logic [5:0] ADDR_READPORT         = 6'd41;

  // Order book controller states (numbering as in the design's waveforms).
  typedef enum logic [2:0] {
    S_IDLE     = 3'd0,
    S_ADD      = 3'd1,
    S_DELETE   = 3'd2,
    S_SHIFT    = 3'd3,
    S_FIND_MAX = 3'd4,
    S_DECREASE = 3'd5
  } book_state_t;

  // A decoded command as handed from the parser to the books.
  typedef struct packed {
    logic [11:0] stock_activate;
    entry_t      e;
  } command_t;

  // Strictly-greater price comparison used everywhere a maximum is kept:
  // among equal prices the one seen first stays.
  function automatic logic beats(input logic cand_v, input entry_t cand,
                                 input logic best_v, input entry_t best);
    return cand_v && (!best_v || cand.price > best.price);
  endfunction

endpackage
