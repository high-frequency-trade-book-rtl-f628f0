// Top of the bid-side book builder peripheral.
//
// A processor on the bus writes each market message into the register
// bank, one byte per address, and sets BUFFER_NOT_EMPTY. The book builder
// decodes the message, routes it to one of four per-stock order books,
// and each book keeps its best bid (highest-price order) on the max_*
// outputs. Software polls READPORT (or BUFFER_NOT_EMPTY) before writing
// the next message. reset is active high and synchronous; everything runs
// on clk.
//
// Address map (8-bit data): 0..39 message bytes, 40 BUFFER_NOT_EMPTY,
// 41 READPORT (read only, 1 = buffer free). The per-stock best bids and
// book fill counts are brought out as ports, stock 1 at index 0.
//
// The module name, its bus ports and the register bank / parser / four
// books partitioning follow the design. The max_* and book_count outputs
// are ports because the design does not say how results leave the chip.
module vga_ball
  import book_pkg::*;
#(
  parameter int DEPTH = 1000,
  parameter int WAYS  = 4,
  localparam int NW = $clog2(DEPTH + 1)
) (
  input  logic                          clk,
  input  logic                          reset,
  input  logic [7:0]                    writedata,
  input  logic                          write,
  input  logic                          read,
  input  logic                          chipselect,
  input  logic [5:0]                    address,
  output logic [7:0]                    readdata,
  output logic [NUM_STOCKS-1:0][31:0]   max_order_id,
  output logic [NUM_STOCKS-1:0][31:0]   max_quantity,
  output logic [NUM_STOCKS-1:0][63:0]   max_price,
  output logic [NUM_STOCKS-1:0][NW-1:0] book_count,
  output logic                          system_free
);

  logic [319:0] ff_buffer;
  logic         buffer_not_empty;
  logic         buffer_taken;

  register_bank u_regs (
    .clk             (clk),
    .reset           (reset),
    .writedata       (writedata),
    .write           (write),
    .read            (read),
    .chipselect      (chipselect),
    .address         (address),
    .readdata        (readdata),
    .buffer_taken    (buffer_taken),
    .ff_buffer       (ff_buffer),
    .buffer_not_empty(buffer_not_empty)
  );

  book_builder #(.DEPTH(DEPTH), .WAYS(WAYS)) u_core (
    .clk             (clk),
    .resetn          (!reset),
    .ff_buffer       (ff_buffer),
    .buffer_not_empty(buffer_not_empty),
    .buffer_taken    (buffer_taken),
    .system_free     (system_free),
    .max_order_id    (max_order_id),
    .max_quantity    (max_quantity),
    .max_price       (max_price),
    .book_count      (book_count)
  );

endmodule
