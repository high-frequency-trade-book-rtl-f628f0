// One way of an order book's order storage.
//
// ENTRIES rows of entry_t (order id, quantity, price; 128 bits). The book
// reads one row per cycle through an asynchronous read port and writes at
// most one row per cycle on the rising clock edge, which is all its linear
// search, row shift and append need. A read address at or past ENTRIES
// returns zero. The storage is not reset: the owning book keeps the count
// of valid rows and never uses a row at or above it.
//
// That each book owns a memory, of 1000 rows split evenly over its ways,
// follows the design; the single-read/single-write port set is this
// implementation's choice.
module book_way_mem
  import book_pkg::*;
#(
  parameter int ENTRIES = 250,
  localparam int AW = $clog2(ENTRIES + 1)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  entry_t        wdata,
  input  logic [AW-1:0] raddr,
  output entry_t        rdata
);

  entry_t mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < ENTRIES) mem[waddr] <= wdata;
  end

  always_comb begin
    rdata = '0;
    if (32'(raddr) < ENTRIES) rdata = mem[raddr];
  end

endmodule
