// Self-checking testbench for order_book.
//
// Drives random ADD / DELETE / DECREASE requests into a small book (40
// orders over 4 ways) and compares, after every request, the best bid and
// the order count with a reference model that keeps the orders of each way
// in a queue. The model also predicts the number of busy cycles of every
// request from the way layout (least-filled way on add, row index of the
// order, rows in the way), and the test checks it. Prices are made unique
// so the best bid is unambiguous.
module tb_order_book;
  import book_pkg::*;

  localparam int DEPTH = 40;
  localparam int WAYS  = 4;
  localparam int ENT   = DEPTH / WAYS;
  localparam int NW    = $clog2(DEPTH + 1);

  logic          clk = 1'b0;
  logic          resetn = 1'b0;
  logic          valid = 1'b0;
  logic [31:0]   order_id = '0;
  logic [31:0]   quantity = '0;
  logic [63:0]   price = '0;
  logic [2:0]    req_type = '0;
  logic [31:0]   max_order_id, max_quantity;
  logic [63:0]   max_price;
  logic          ready;
  logic [NW-1:0] count;

  always #5 clk = ~clk;

  order_book #(.DEPTH(DEPTH), .WAYS(WAYS)) dut (.*);

  int checks = 0, failures = 0;
  entry_t ref_q[WAYS][$];
  int seq = 0;
  int n_add = 0, n_full = 0, n_del = 0, n_del_best = 0, n_dec = 0,
      n_dec_zero = 0, n_miss = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int total();
    int n = 0;
    for (int w = 0; w < WAYS; w++) n += ref_q[w].size();
    return n;
  endfunction

  function automatic int max_rows();
    int m = 0;
    for (int w = 0; w < WAYS; w++) if (ref_q[w].size() > m) m = ref_q[w].size();
    return m;
  endfunction

  function automatic entry_t ref_best(output logic v);
    entry_t b = '0;
    v = 1'b0;
    for (int w = 0; w < WAYS; w++)
      foreach (ref_q[w][i])
        if (!v || ref_q[w][i].price > b.price) begin b = ref_q[w][i]; v = 1'b1; end
    return b;
  endfunction

  function automatic void locate(input logic [31:0] id, output int h, output int j);
    h = -1; j = -1;
    for (int r = 0; r < ENT && h < 0; r++)
      for (int w = 0; w < WAYS; w++)
        if (h < 0 && r < ref_q[w].size() && ref_q[w][r].order_id == id) begin h = w; j = r; end
  endfunction

  // Cost of deleting the order at row j of way h, and remove it from the model.
  function automatic int ref_delete(input int h, input int j);
    logic bv; entry_t b;
    int c = ref_q[h].size();
    int cyc = j + 1 + ((c - 1 - j) > 1 ? (c - 1 - j) : 1);
    b = ref_best(bv);
    if (bv && b.order_id == ref_q[h][j].order_id && WAYS > 1) begin
      cyc += WAYS - 1;
      n_del_best++;
    end
    ref_q[h].delete(j);
    return cyc;
  endfunction

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic issue(input logic [2:0] rt, input entry_t e, input int exp_cyc);
    int cyc = 0;
    logic bv; entry_t b;
    @(negedge clk);
    valid = 1'b1; req_type = rt;
    order_id = e.order_id; quantity = e.quantity; price = e.price;
    @(posedge clk);
    #1 valid = 1'b0;
    while (!ready) begin @(posedge clk); #1 cyc++; end
    check("busy cycles", 128'(cyc), 128'(exp_cyc));
    b = ref_best(bv);
    check("max_order_id", 128'(max_order_id), 128'(bv ? b.order_id : 32'd0));
    check("max_quantity", 128'(max_quantity), 128'(bv ? b.quantity : 32'd0));
    check("max_price",    128'(max_price),    128'(bv ? b.price    : 64'd0));
    check("count",        128'(count),        128'(total()));
  endtask

  task automatic do_add();
    entry_t e;
    int w = 0;
    seq++;
    e.order_id = 32'(seq);
    e.quantity = 32'($urandom_range(1, 1000));
    e.price    = {32'($urandom_range(0, 4000)), 32'(seq)};
    for (int k = 0; k < WAYS; k++) if (ref_q[k].size() < ref_q[w].size()) w = k;
    if (ref_q[w].size() < ENT) begin ref_q[w].push_back(e); n_add++; end
    else n_full++;
    issue(REQ_ADD, e, 1);
  endtask

  function automatic logic [31:0] pick_id();
    int n = total();
    int k;
    if (n == 0 || $urandom_range(0, 9) == 0) return 32'hFFFF_0000 + 32'($urandom_range(0, 99));
    k = $urandom_range(0, n - 1);
    for (int w = 0; w < WAYS; w++) begin
      if (k < ref_q[w].size()) return ref_q[w][k].order_id;
      k -= ref_q[w].size();
    end
    return 32'hFFFF_FFFF;
  endfunction

  task automatic do_delete(input logic [31:0] id);
    int h, j, cyc;
    entry_t e = '0;
    e.order_id = id;
    locate(id, h, j);
    if (h < 0) begin
      cyc = max_rows() > 1 ? max_rows() : 1;
      n_miss++;
    end else begin
      cyc = ref_delete(h, j);
      n_del++;
    end
    issue(REQ_DELETE, e, cyc);
  endtask

  task automatic do_decrease(input logic [31:0] id, input logic [31:0] q);
    int h, j, cyc;
    entry_t e = '0;
    e.order_id = id;
    e.quantity = q;
    locate(id, h, j);
    if (h < 0) begin
      cyc = max_rows() > 1 ? max_rows() : 1;
      n_miss++;
    end else if (q >= ref_q[h][j].quantity) begin
      cyc = j + 1 + ref_delete(h, j);
      n_dec_zero++;
    end else begin
      ref_q[h][j].quantity -= q;
      cyc = j + 1;
      n_dec++;
    end
    issue(REQ_DECREASE, e, cyc);
  endtask

  task automatic delete_best();
    logic bv; entry_t b;
    b = ref_best(bv);
    if (bv) do_delete(b.order_id);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    resetn = 1'b1;
    // Empty-book requests.
    do_delete(32'd77);
    do_decrease(32'd77, 32'd5);
    // Fill past capacity: the last adds must be ignored.
    repeat (DEPTH + 3) do_add();
    // Drain the best bid repeatedly.
    repeat (5) delete_best();
    // Random traffic.
    for (int t = 0; t < 3000; t++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 45) do_add();
      else if (r < 65) do_delete(pick_id());
      else if (r < 75) delete_best();
      else if (r < 90) do_decrease(pick_id(), 32'($urandom_range(1, 300)));
      else do_decrease(pick_id(), 32'd100000);
    end
    // Empty it completely.
    while (total() > 0) delete_best();
    $display("adds=%0d full=%0d deletes=%0d best_deletes=%0d decreases=%0d dec_to_zero=%0d misses=%0d",
             n_add, n_full, n_del, n_del_best, n_dec, n_dec_zero, n_miss);
    checks++;
    if (n_full == 0 || n_del_best == 0 || n_dec_zero == 0 || n_miss == 0 || n_dec == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
