// Message parser: decodes one 40-byte market message into a book request.
//
// ff_buffer holds the message with byte 0 in bits [319:312] (the order in
// which the bytes arrive), multi-byte fields big-endian. The parser is pure
// combinational logic. It extracts the order reference number, quantity
// and price, and turns message type, side and order book id into the
// 12-bit one-hot stock_activate: three bits (ADD, DELETE, DECREASE) for
// each of four stocks, stock 1 in bits [11:9] ... stock 4 in bits [2:0].
//
// Following the design: the port set, the 12-bit one-hot code and the
// field offsets of the message. This implementation's choices: message
// type 'A' is ADD, 'D' DELETE and 'X' DECREASE; the stock is selected by
// the two low bits of the order book id (0 -> stock 1); a message for
// another side than SIDE (buy, 'B', since the books keep the best bid) or
// with an unknown type activates nothing.
module parser
  import book_pkg::*;
#(
  parameter logic [7:0] SIDE = SIDE_BUY
) (
  input  logic [319:0] ff_buffer,
  output logic [31:0]  out_order_id,
  output logic [31:0]  out_quantity,
  output logic [63:0]  out_price,
  output logic [31:0]  out_stock_id,
  output logic [11:0]  stock_activate
);

  // Byte k of the message.
  function automatic logic [7:0] msg_byte(input logic [319:0] buf_i, input int k);
    return buf_i[319 - 8*k -: 8];
  endfunction

  logic [7:0] msg_type;
  logic [7:0] side;
  logic [2:0] req;

  always_comb begin
    msg_type     = msg_byte(ff_buffer, OFF_MSG_TYPE);
    side         = msg_byte(ff_buffer, OFF_SIDE);
    out_order_id = ff_buffer[319 - 8*OFF_ORDER_REF -: 32];
    out_quantity = ff_buffer[319 - 8*OFF_QUANTITY  -: 32];
    out_price    = ff_buffer[319 - 8*OFF_PRICE     -: 64];
    out_stock_id = ff_buffer[319 - 8*OFF_BOOK_ID   -: 32];

    unique case (msg_type)
      MSG_ADD:      req = REQ_ADD;
      MSG_DELETE:   req = REQ_DELETE;
      MSG_DECREASE: req = REQ_DECREASE;
      default:      req = 3'b000;
    endcase
    if (side != SIDE) req = 3'b000;

    stock_activate = {req, 9'b0} >> (3 * out_stock_id[1:0]);
  end

endmodule
