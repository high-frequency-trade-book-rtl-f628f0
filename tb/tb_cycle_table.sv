// Request latency of one order book at its default size (1000 orders,
// 4 ways), against the cycle table of the 4-way design with N = 1000
// resting orders:
//   ADD                      1 cycle
//   DELETE (not best bid)    ~N/4      -> 250 cycles for any row but the last
//   DELETE of the best bid   N/4 + 3   -> 253 cycles when it sits in row 0
//   DECREASE                 position / 4 -> j+1 cycles for row j of a way
// The book is filled with 1000 orders whose prices fall with arrival, so
// the best bid is the very first order (way 0, row 0). The least-filled
// placement puts order k in way k % 4, row k / 4.
// A second book built with 10 ways (the other way count the design was
// tried with) receives the same requests; its expected counts follow the
// same rules with N/10 rows per way: 100, 100 + 9 and 5 cycles.
module tb_cycle_table;
  import book_pkg::*;

  localparam int N = 1000;

  logic        clk = 1'b0, resetn = 1'b0, valid = 1'b0;
  logic [31:0] order_id = '0, quantity = '0;
  logic [63:0] price = '0;
  logic [2:0]  req_type = '0;
  logic [31:0] max_order_id, max_quantity;
  logic [63:0] max_price;
  logic        ready, ready10;
  logic [$clog2(N + 1)-1:0] count, count10;
  logic [31:0] max_order_id10, max_quantity10;
  logic [63:0] max_price10;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  order_book dut (.*);

  order_book #(.WAYS(10)) dut10 (
    .clk, .resetn, .valid, .order_id, .quantity, .price, .req_type,
    .max_order_id(max_order_id10), .max_quantity(max_quantity10), .max_price(max_price10),
    .ready(ready10), .count(count10)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic issue(input logic [2:0] rt, input int id, input int q, input longint px,
                       output int cyc, output int cyc10);
    @(negedge clk);
    valid = 1'b1; req_type = rt; order_id = 32'(id); quantity = 32'(q); price = 64'(px);
    @(posedge clk);
    #1 valid = 1'b0;
    cyc = 0;
    cyc10 = 0;
    while (!ready || !ready10) begin
      logic busy, busy10;
      busy = !ready;
      busy10 = !ready10;
      @(posedge clk);
      #1;
      if (busy) cyc++;
      if (busy10) cyc10++;
    end
  endtask

  initial begin
    int cyc, cyc10;
    repeat (3) @(posedge clk);
    resetn = 1'b1;
    for (int k = 0; k < N; k++) begin
      issue(REQ_ADD, k, 100, 64'(100000 - k), cyc, cyc10);
      expect_eq("ADD cycles", cyc, 1);
      expect_eq("ADD cycles, 10 ways", cyc10, 1);
    end
    expect_eq("count full", longint'(count), N);
    expect_eq("best bid", longint'(max_order_id), 0);
    // DECREASE of order 41: way 1, row 10 -> 11 cycles.
    issue(REQ_DECREASE, 41, 30, 0, cyc, cyc10);
    expect_eq("DECREASE row 10 cycles", cyc, 11);
    expect_eq("DECREASE row 4 cycles, 10 ways", cyc10, 5);
    // DELETE of order 402 (way 2, row 100, not the best): N/4 cycles.
    issue(REQ_DELETE, 402, 0, 0, cyc, cyc10);
    expect_eq("DELETE cycles (N/4)", cyc, N / 4);
    expect_eq("DELETE cycles (N/10), 10 ways", cyc10, N / 10);
    expect_eq("best unchanged", longint'(max_order_id), 0);
    // DELETE of the best bid, order 0 at way 0 row 0: N/4 + 3 cycles,
    // counted with N = 999 orders now resting (way 0 still holds 250).
    issue(REQ_DELETE, 0, 0, 0, cyc, cyc10);
    expect_eq("DELETE best cycles (N/4+3)", cyc, N / 4 + 3);
    expect_eq("DELETE best cycles (N/10+9), 10 ways", cyc10, N / 10 + 9);
    expect_eq("new best, 10 ways", longint'(max_order_id10), 1);
    expect_eq("count, 10 ways", longint'(count10), N - 2);
    expect_eq("new best", longint'(max_order_id), 1);
    expect_eq("new best price", longint'(max_price), 100000 - 1);
    expect_eq("count", longint'(count), N - 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
