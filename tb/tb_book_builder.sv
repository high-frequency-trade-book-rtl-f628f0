// Self-checking testbench for book_builder (parser, controller and four
// small books of 40 orders, 4 ways).
//
// The test plays the register bank: it places a message in ff_buffer,
// raises buffer_not_empty and clears it on buffer_taken. It checks that
// the message is taken in the first cycle the books are free, that an ADD
// shows in the target book's count exactly three clock edges after the
// flag rises (take, issue, add), that only the addressed stock changes,
// and the best bid of every stock against a reference model, for adds,
// deletes (including the best bid), decreases and ignored messages.
module tb_book_builder;
  import book_pkg::*;

  localparam int DEPTH = 40;
  localparam int WAYS  = 4;
  localparam int NW = $clog2(DEPTH + 1);

  logic         clk = 1'b0, resetn = 1'b0;
  logic [319:0] ff_buffer = '0;
  logic         buffer_not_empty = 1'b0;
  logic         buffer_taken, system_free;
  logic [3:0][31:0]   max_order_id, max_quantity;
  logic [3:0][63:0]   max_price;
  logic [3:0][NW-1:0] book_count;

  always #5 clk = ~clk;

  book_builder #(.DEPTH(DEPTH), .WAYS(WAYS)) dut (.*);

  int checks = 0, failures = 0;
  entry_t book [4][$];
  int seq = 0;
  int n_add = 0, n_del = 0, n_del_best = 0, n_dec = 0, n_ignored = 0, n_wait = 0;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Register bank stand-in: the flag clears when the message is taken.
  always @(posedge clk) if (buffer_taken) buffer_not_empty <= 1'b0;

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  function automatic logic [319:0] build(input logic [7:0] typ, input int s, input logic [7:0] side,
      input logic [31:0] ref_no, input logic [31:0] qty, input logic [63:0] px);
    logic [319:0] r;
    logic [31:0] book_id;
    book_id = {30'($urandom), 2'(s)};
    r = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    r[319 -: 8]          = typ;
    r[319 - 8*9  -: 32]  = ref_no;
    r[319 - 8*17 -: 32]  = book_id;
    r[319 - 8*21 -: 8]   = side;
    r[319 - 8*22 -: 32]  = qty;
    r[319 - 8*26 -: 64]  = px;
    return r;
  endfunction

  task automatic compare();
    for (int s = 0; s < 4; s++) begin
      int b = -1;
      entry_t exp;
      foreach (book[s][i]) if (b < 0 || book[s][i].price > book[s][b].price) b = i;
      exp = (b < 0) ? '0 : book[s][b];
      expect_eq("max_order_id", 64'(max_order_id[s]), 64'(exp.order_id));
      expect_eq("max_quantity", 64'(max_quantity[s]), 64'(exp.quantity));
      expect_eq("max_price", max_price[s], exp.price);
      expect_eq("count", 64'(book_count[s]), 64'(book[s].size()));
    end
  endtask

  // Present a message and wait until it has been processed.
  task automatic send(input logic [319:0] msg, input int s, input logic is_add);
    int n_before;
    n_before = int'(book_count[s]);
    @(negedge clk);
    ff_buffer = msg;
    buffer_not_empty = 1'b1;
    if (is_add) begin
      repeat (2) @(posedge clk);
      #1 expect_eq("count before add completes", 64'(book_count[s]), 64'(n_before));
      @(posedge clk);
      #1 expect_eq("count three edges after flag", 64'(book_count[s]), 64'(n_before + 1));
    end
    while (buffer_not_empty) @(posedge clk);
    #1;
    while (!system_free) begin @(posedge clk); #1; end
    compare();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    resetn = 1'b1;
    #1;
    expect_eq("free after reset", 64'(system_free), 64'd1);
    for (int t = 0; t < 1500; t++) begin
      int s, r;
      s = $urandom_range(0, 3);
      r = $urandom_range(0, 99);
      if ((r < 50 || book[s].size() == 0) && book[s].size() < DEPTH) begin
        entry_t e;
        seq++;
        e.order_id = 32'(seq);
        e.quantity = 32'($urandom_range(1, 100));
        e.price = {32'($urandom_range(0, 999)), 32'(seq)};
        book[s].push_back(e);
        n_add++;
        send(build(MSG_ADD, s, SIDE_BUY, e.order_id, e.quantity, e.price), s, 1'b1);
      end else if (r < 75 && book[s].size() > 0) begin
        int i, b;
        logic [31:0] id;
        i = $urandom_range(0, book[s].size() - 1);
        b = 0;
        foreach (book[s][k]) if (book[s][k].price > book[s][b].price) b = k;
        if (r < 60) i = b;
        if (i == b) n_del_best++; else n_del++;
        id = book[s][i].order_id;
        book[s].delete(i);
        send(build(MSG_DELETE, s, SIDE_BUY, id, 32'd0, 64'd0), s, 1'b0);
      end else if (r < 90 && book[s].size() > 0) begin
        int i;
        logic [31:0] q, id;
        i = $urandom_range(0, book[s].size() - 1);
        q = 32'($urandom_range(1, 120));
        id = book[s][i].order_id;
        if (q >= book[s][i].quantity) book[s].delete(i); else book[s][i].quantity -= q;
        n_dec++;
        send(build(MSG_DECREASE, s, SIDE_BUY, id, q, 64'd0), s, 1'b0);
      end else begin
        n_ignored++;
        send(build(MSG_ADD, s, 8'h53, 32'hEEEE_0000, 32'd1, 64'hFFFF_FFFF), s, 1'b0);
      end
    end
    $display("adds=%0d deletes=%0d best_deletes=%0d decreases=%0d ignored=%0d",
             n_add, n_del, n_del_best, n_dec, n_ignored);
    checks++;
    if (n_del == 0 || n_del_best == 0 || n_dec == 0 || n_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
