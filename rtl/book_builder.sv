// Book builder core: the parser and the four per-stock order books.
//
// The parser decodes the message buffer, parser_ctrl hands the command to
// the books when all of them are idle (system_free = AND of the books'
// ready), and book k takes the three stock_activate bits that belong to it
// as its req_type. Each book reports its best bid (order id, quantity,
// price) and its number of resting orders; index 0 of each output array is
// stock 1.
//
// The structure (one parser feeding four order books, each with its own
// memory) follows the design; gating every message on all four books
// being free is as the design's system_free signal suggests.
module book_builder
  import book_pkg::*;
#(
  parameter int DEPTH = 1000,
  parameter int WAYS  = 4,
  localparam int NW = $clog2(DEPTH + 1)
) (
  input  logic                            clk,
  input  logic                            resetn,
  input  logic [319:0]                    ff_buffer,
  input  logic                            buffer_not_empty,
  output logic                            buffer_taken,
  output logic                            system_free,
  output logic [NUM_STOCKS-1:0][31:0]     max_order_id,
  output logic [NUM_STOCKS-1:0][31:0]     max_quantity,
  output logic [NUM_STOCKS-1:0][63:0]     max_price,
  output logic [NUM_STOCKS-1:0][NW-1:0]   book_count
);

  command_t decoded, cmd;
  logic     master_valid;
  logic     slave_ready;
  logic [31:0] stock_id;
  logic [NUM_STOCKS-1:0] book_ready;

  parser u_parser (
    .ff_buffer     (ff_buffer),
    .out_order_id  (decoded.e.order_id),
    .out_quantity  (decoded.e.quantity),
    .out_price     (decoded.e.price),
    .out_stock_id  (stock_id),
    .stock_activate(decoded.stock_activate)
  );

  parser_ctrl u_ctrl (
    .clk             (clk),
    .resetn          (resetn),
    .buffer_not_empty(buffer_not_empty),
    .system_free     (system_free),
    .decoded         (decoded),
    .buffer_taken    (buffer_taken),
    .master_valid    (master_valid),
    .slave_ready     (slave_ready),
    .cmd             (cmd)
  );

  for (genvar s = 0; s < NUM_STOCKS; s++) begin : g_stock
    logic [2:0] req_type;
    assign req_type = cmd.stock_activate[11 - 3*s -: 3];

    order_book #(.DEPTH(DEPTH), .WAYS(WAYS)) u_book (
      .clk         (clk),
      .resetn      (resetn),
      .valid       (master_valid && req_type != '0),
      .order_id    (cmd.e.order_id),
      .quantity    (cmd.e.quantity),
      .price       (cmd.e.price),
      .req_type    (req_type),
      .max_order_id(max_order_id[s]),
      .max_quantity(max_quantity[s]),
      .max_price   (max_price[s]),
      .ready       (book_ready[s]),
      .count       (book_count[s])
    );
  end

  assign system_free = &book_ready;

endmodule
