// Self-checking testbench for parser: builds messages byte by byte from
// field values, including the example add order of the message layout
// (order reference 1002, order book id 0x000500CD, buy, quantity 1, price
// 1), and checks the extracted fields and the one-hot stock_activate code
// for every message type, side and stock.
module tb_parser;
  import book_pkg::*;

  logic [319:0] ff_buffer = '0;
  logic [31:0]  out_order_id, out_quantity, out_stock_id;
  logic [63:0]  out_price;
  logic [11:0]  stock_activate;
  int checks = 0, failures = 0;

  parser dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [319:0] build(input logic [7:0] typ, input logic [63:0] ts,
      input logic [31:0] ref_no, input logic [31:0] book, input logic [7:0] side,
      input logic [31:0] qty, input logic [63:0] px);
    logic [7:0] b [40];
    logic [319:0] r;
    foreach (b[k]) b[k] = 8'($urandom);     // unused bytes get noise
    b[0] = typ;
    for (int k = 0; k < 8; k++) b[1 + k]  = ts[63 - 8*k -: 8];
    for (int k = 0; k < 4; k++) b[9 + k]  = ref_no[31 - 8*k -: 8];
    for (int k = 0; k < 4; k++) b[17 + k] = book[31 - 8*k -: 8];
    b[21] = side;
    for (int k = 0; k < 4; k++) b[22 + k] = qty[31 - 8*k -: 8];
    for (int k = 0; k < 8; k++) b[26 + k] = px[63 - 8*k -: 8];
    for (int k = 0; k < 40; k++) r[319 - 8*k -: 8] = b[k];
    return r;
  endfunction

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [7:0]  types [4] = '{8'h41, 8'h44, 8'h58, 8'h45};
    logic [2:0]  codes [4] = '{3'b100, 3'b010, 3'b001, 3'b000};
    // Example add order of the message layout: stock 2 (book id & 3 = 1).
    ff_buffer = build(8'h41, 64'd0, 32'd1002, 32'h000500CD, 8'h42, 32'd1, 64'd1);
    #1;
    expect_eq("example order id", 64'(out_order_id), 64'd1002);
    expect_eq("example quantity", 64'(out_quantity), 64'd1);
    expect_eq("example price", out_price, 64'd1);
    expect_eq("example stock id", 64'(out_stock_id), 64'h000500CD);
    expect_eq("example activate (ADD2)", 64'(stock_activate), 64'(12'b000100000000));
    for (int t = 0; t < 2000; t++) begin
      int ti;
      logic [31:0] id, qty, book;
      logic [63:0] px;
      logic [7:0] side;
      logic [11:0] exp;
      ti   = $urandom_range(0, 3);
      id   = $urandom;
      qty  = $urandom;
      book = $urandom;
      px   = {$urandom, $urandom};
      side = ($urandom_range(0, 3) == 0) ? 8'h53 : 8'h42;
      ff_buffer = build(types[ti], {$urandom, $urandom}, id, book, side, qty, px);
      #1;
      exp = (side == 8'h42) ? (12'({codes[ti], 9'b0}) >> (3 * book[1:0])) : 12'b0;
      expect_eq("order id", 64'(out_order_id), 64'(id));
      expect_eq("quantity", 64'(out_quantity), 64'(qty));
      expect_eq("price", out_price, px);
      expect_eq("stock_activate", 64'(stock_activate), 64'(exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
