// End-to-end testbench of the whole peripheral at its default size (four
// books of 1000 orders, 4 ways each).
//
// Like the driver software, it writes each 40-byte message over the bus,
// one byte per address, sets BUFFER_NOT_EMPTY and polls READPORT before
// the next message. A reference model keeps the resting orders of every
// stock; after each message has been processed (READPORT = 1 and all books
// free) the best bid and order count of all four books are compared with
// it. The run fills stock 1 past its 1000 orders, then sends random add,
// delete, delete-of-best, partial and full decrease, unknown-order,
// sell-side and unknown-type messages, and counts that each of these
// happened, as well as the bus seeing the buffer busy.
module tb_vga_ball;
  import book_pkg::*;

  localparam int DEPTH = 1000;
  localparam int NW = $clog2(DEPTH + 1);

  logic       clk = 1'b0, reset = 1'b1;
  logic [7:0] writedata = '0;
  logic       write = 1'b0, read = 1'b0, chipselect = 1'b0;
  logic [5:0] address = '0;
  logic [7:0] readdata;
  logic [3:0][31:0]   max_order_id, max_quantity;
  logic [3:0][63:0]   max_price;
  logic [3:0][NW-1:0] book_count;
  logic       system_free;

  always #5 clk = ~clk;

  vga_ball dut (.*);

  int checks = 0, failures = 0;
  entry_t book [4][$];
  int seq = 0;
  int n_add = 0, n_full = 0, n_del = 0, n_del_best = 0, n_dec = 0, n_dec_zero = 0,
      n_miss = 0, n_sell = 0, n_unknown = 0, n_busy = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(input int a, input logic [7:0] d);
    @(negedge clk);
    chipselect = 1'b1; write = 1'b1; address = 6'(a); writedata = d;
    @(posedge clk);
    #1 chipselect = 1'b0; write = 1'b0;
  endtask

  task automatic bus_read(input int a, output logic [7:0] d);
    @(negedge clk);
    chipselect = 1'b1; read = 1'b1; address = 6'(a);
    #1 d = readdata;
    @(posedge clk);
    #1 chipselect = 1'b0; read = 1'b0;
  endtask

  task automatic wait_idle();
    logic [7:0] d;
    do begin
      bus_read(ADDR_READPORT, d);
      if (d == 0) n_busy++;
    end while (d == 0 || !system_free);
  endtask

  task automatic send(input logic [7:0] typ, input logic [31:0] book_id, input logic [7:0] side,
                      input logic [31:0] ref_no, input logic [31:0] qty, input logic [63:0] px);
    logic [7:0] b [40];
    foreach (b[k]) b[k] = 8'($urandom);
    b[0] = typ;
    for (int k = 0; k < 4; k++) b[9 + k]  = ref_no[31 - 8*k -: 8];
    for (int k = 0; k < 4; k++) b[17 + k] = book_id[31 - 8*k -: 8];
    b[21] = side;
    for (int k = 0; k < 4; k++) b[22 + k] = qty[31 - 8*k -: 8];
    for (int k = 0; k < 8; k++) b[26 + k] = px[63 - 8*k -: 8];
    wait_idle();
    for (int k = 0; k < 40; k++) bus_write(k, b[k]);
    bus_write(ADDR_BUFFER_NOT_EMPTY, 8'd1);
    wait_idle();
    compare();
  endtask

  function automatic int find(input int s, input logic [31:0] id);
    foreach (book[s][i]) if (book[s][i].order_id == id) return i;
    return -1;
  endfunction

  function automatic int best_idx(input int s);
    int b = -1;
    foreach (book[s][i]) if (b < 0 || book[s][i].price > book[s][b].price) b = i;
    return b;
  endfunction

  task automatic compare();
    for (int s = 0; s < 4; s++) begin
      int b = best_idx(s);
      entry_t exp = (b < 0) ? '0 : book[s][b];
      checks += 4;
      if (max_order_id[s] !== exp.order_id || max_quantity[s] !== exp.quantity ||
          max_price[s] !== exp.price || 32'(book_count[s]) != book[s].size()) begin
        failures++;
        $display("FAIL stock %0d: got id %0d qty %0d px %0d n %0d, expected id %0d qty %0d px %0d n %0d",
                 s + 1, max_order_id[s], max_quantity[s], max_price[s], book_count[s],
                 exp.order_id, exp.quantity, exp.price, book[s].size());
      end
    end
  endtask

  function automatic logic [31:0] book_id_of(input int s);
    return {14'($urandom), 16'h0500, 2'(s)};
  endfunction

  task automatic add(input int s);
    entry_t e;
    seq++;
    e.order_id = 32'(seq);
    e.quantity = 32'($urandom_range(1, 5000));
    e.price    = {32'($urandom_range(0, 99999)), 32'(seq)};
    if (book[s].size() < DEPTH) begin book[s].push_back(e); n_add++; end
    else n_full++;
    send(MSG_ADD, book_id_of(s), SIDE_BUY, e.order_id, e.quantity, e.price);
  endtask

  function automatic logic [31:0] pick(input int s);
    if (book[s].size() == 0 || $urandom_range(0, 9) == 0) return 32'hF000_0000 + 32'($urandom_range(0, 9));
    return book[s][$urandom_range(0, book[s].size() - 1)].order_id;
  endfunction

  task automatic del(input int s, input logic [31:0] id);
    int i = find(s, id);
    int b = best_idx(s);
    if (i < 0) n_miss++;
    else begin
      if (i == b) n_del_best++; else n_del++;
      book[s].delete(i);
    end
    send(MSG_DELETE, book_id_of(s), SIDE_BUY, id, 32'($urandom), 64'd0);
  endtask

  task automatic dec(input int s, input logic [31:0] id, input logic [31:0] q);
    int i = find(s, id);
    if (i < 0) n_miss++;
    else if (q >= book[s][i].quantity) begin book[s].delete(i); n_dec_zero++; end
    else begin book[s][i].quantity -= q; n_dec++; end
    send(MSG_DECREASE, book_id_of(s), SIDE_BUY, id, q, 64'd0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 1'b0;
    // Stock 1 filled beyond capacity.
    repeat (DEPTH + 2) add(0);
    repeat (4) del(0, book[0][best_idx(0)].order_id);
    repeat (6) del(0, pick(0));
    for (int t = 0; t < 3000; t++) begin
      int s, r;
      s = $urandom_range(0, 3);
      r = $urandom_range(0, 99);
      if (r < 40) add(s);
      else if (r < 55) del(s, pick(s));
      else if (r < 65) begin
        if (book[s].size() > 0) del(s, book[s][best_idx(s)].order_id);
        else del(s, pick(s));
      end
      else if (r < 80) dec(s, pick(s), 32'($urandom_range(1, 2000)));
      else if (r < 88) dec(s, pick(s), 32'hFFFF_FFFF);
      else if (r < 94) begin
        n_sell++;
        send(MSG_ADD, book_id_of(s), 8'h53, 32'hE000_0000 + 32'(t), 32'd10, 64'hFFFF_FFFF_FFFF_FFFF);
      end else begin
        n_unknown++;
        send(8'h45, book_id_of(s), SIDE_BUY, pick(s), 32'd1, 64'd0);
      end
    end
    $display("adds=%0d full=%0d deletes=%0d best_deletes=%0d decreases=%0d dec_to_zero=%0d misses=%0d sell=%0d unknown=%0d busy_polls=%0d",
             n_add, n_full, n_del, n_del_best, n_dec, n_dec_zero, n_miss, n_sell, n_unknown, n_busy);
    checks++;
    if (n_full == 0 || n_del == 0 || n_del_best == 0 || n_dec == 0 || n_dec_zero == 0 ||
        n_miss == 0 || n_sell == 0 || n_unknown == 0 || n_busy == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
