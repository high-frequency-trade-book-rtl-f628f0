// Bid-side order book for one stock.
//
// The book stores up to DEPTH resting orders (order id, quantity, price)
// and always presents the order with the highest price on max_order_id /
// max_quantity / max_price. Storage is split into WAYS independent ways of
// DEPTH/WAYS rows (book_way_mem). Every way reads the same row index in a
// cycle, so a search over N orders spread evenly takes about N/WAYS cycles.
// Inside a way the valid rows are packed at the bottom, in arrival order.
//
// Requests arrive on a valid/ready handshake; ready is high only in IDLE
// and a request is taken when valid && ready. req_type is one-hot:
//   ADD (3'b100)      append to the least-filled way and compare with the
//                     best bid.                          1 busy cycle.
//   DELETE (3'b010)   search all ways in parallel (row j in cycle j), then
//                     close the gap by moving the rows above it down one
//                     per cycle (SHIFT). About N/WAYS busy cycles.
//   DECREASE (3'b001) search, subtract the request's quantity; a result of
//                     zero (or less) turns into a DELETE of that order.
// While DELETE and SHIFT walk the affected way they read every other row of
// it, so the way's own maximum is rebuilt for free. Each way keeps its
// maximum in a register; if the deleted order was the best bid, FIND_MAX
// merges the WAYS way maxima, one way per cycle (WAYS-1 cycles), so
// deleting the best bid costs about N/WAYS + WAYS-1 cycles.
//
// Exact busy cycles (ready low) with c valid rows in the hit way and the
// order at row j of it: ADD 1; DELETE (j+1) + max(c-1-j, 1), plus WAYS-1
// when it was the best bid; DECREASE j+1, plus the DELETE cost when the
// quantity reaches zero; an order id that is not found costs
// max(rows in the fullest way, 1).
//
// The request encoding, the state set (IDLE, ADD, DELETE, SHIFT, FIND_MAX,
// DECREASE), the 1000-entry memory, the row shift on delete, the
// rescan only when the best bid leaves, and the 4-way split follow the
// design. Choosing the least-filled way for an add, rebuilding the way
// maximum during the delete pass, strict-greater price comparison (the
// earlier order wins a tie inside a way, the lower way wins across ways),
// ignoring an ADD when the book is full and dropping a request whose order
// id is absent are this implementation's choices. When the book is empty
// the max outputs are zero. Order ids are assumed unique within a book.
module order_book
  import book_pkg::*;
#(
  parameter int DEPTH = 1000,
  parameter int WAYS  = 4,
  localparam int ENTRIES = DEPTH / WAYS,
  localparam int CW = $clog2(ENTRIES + 1),
  localparam int WW = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int NW = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          resetn,
  input  logic          valid,
  input  logic [31:0]   order_id,
  input  logic [31:0]   quantity,
  input  logic [63:0]   price,
  input  logic [2:0]    req_type,
  output logic [31:0]   max_order_id,
  output logic [31:0]   max_quantity,
  output logic [63:0]   max_price,
  output logic          ready,
  output logic [NW-1:0] count
);

  book_state_t state;

  entry_t          req;                 // latched request
  logic [CW-1:0]   cnt      [WAYS];     // valid rows per way
  logic [CW-1:0]   idx;                 // row being searched / shifted
  logic [WW-1:0]   hit_way;
  entry_t          way_max  [WAYS];
  logic            way_max_v[WAYS];
  entry_t          acc      [WAYS];     // way maxima rebuilt during delete
  logic            acc_v    [WAYS];
  entry_t          best;                // best bid of the whole book
  logic            best_v;
  entry_t          cmb;                 // FIND_MAX running result
  logic            cmb_v;
  logic [WW-1:0]   cmb_i;

  // Memory ports.
  logic [CW-1:0] raddr;
  entry_t        rdata [WAYS];
  logic          we    [WAYS];
  logic [CW-1:0] waddr;
  entry_t        wdata;

  // ------------------------------------------------------------------
  // Combinational helpers
  // ------------------------------------------------------------------
  logic [WW-1:0] add_way;       // least-filled way
  logic [CW-1:0] max_cnt;       // rows in the fullest way
  logic          row_valid[WAYS];
  logic          match    [WAYS];
  logic          hit;
  logic [WW-1:0] hit_w;

  always_comb begin
    add_way = '0;
    max_cnt = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (cnt[w] < cnt[add_way]) add_way = WW'(w);
      if (cnt[w] > max_cnt) max_cnt = cnt[w];
    end
  end

  always_comb begin
    hit   = 1'b0;
    hit_w = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      row_valid[w] = idx < cnt[w];
      match[w]     = row_valid[w] && rdata[w].order_id == req.order_id;
      if (match[w]) begin
        hit   = 1'b1;
        hit_w = WW'(w);
      end
    end
  end

  // Quantity left after a DECREASE of the matching row.
  logic [31:0] dec_left;
  always_comb begin
    dec_left = '0;
    if (rdata[hit_w].quantity > req.quantity)
      dec_left = rdata[hit_w].quantity - req.quantity;
  end

  // SHIFT: is there a row above idx to move down, and is this the last cycle.
  logic          shift_move;
  logic          shift_last;
  entry_t        acc_next;    // hit way's rebuilt maximum including this cycle
  logic          acc_next_v;
  always_comb begin
    shift_move = 32'(idx) + 1 < 32'(cnt[hit_way]);
    shift_last = 32'(idx) + 2 >= 32'(cnt[hit_way]);
    acc_next   = acc[hit_way];
    acc_next_v = acc_v[hit_way];
    if (shift_move && beats(1'b1, rdata[hit_way], acc_v[hit_way], acc[hit_way])) begin
      acc_next   = rdata[hit_way];
      acc_next_v = 1'b1;
    end
  end

  // Memory port control.
  always_comb begin
    raddr = (state == S_SHIFT) ? idx + CW'(1) : idx;
    waddr = idx;
    wdata = req;
    for (int w = 0; w < WAYS; w++) we[w] = 1'b0;
    unique case (state)
      S_ADD: begin
        waddr = cnt[add_way];
        if (32'(cnt[add_way]) < ENTRIES) we[add_way] = 1'b1;
      end
      S_SHIFT: begin
        wdata = rdata[hit_way];
        we[hit_way] = shift_move;
      end
      S_DECREASE: begin
        wdata = rdata[hit_w];
        wdata.quantity = dec_left;
        we[hit_w] = hit && dec_left != 0;
      end
      default: ;
    endcase
  end

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    book_way_mem #(.ENTRIES(ENTRIES)) u_mem (
      .clk  (clk),
      .we   (we[w]),
      .waddr(waddr),
      .wdata(wdata),
      .raddr(raddr),
      .rdata(rdata[w])
    );
  end

  // ------------------------------------------------------------------
  // Controller
  // ------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!resetn) begin
      state   <= S_IDLE;
      req     <= '0;
      idx     <= '0;
      hit_way <= '0;
      best    <= '0;
      best_v  <= 1'b0;
      cmb     <= '0;
      cmb_v   <= 1'b0;
      cmb_i   <= '0;
      for (int w = 0; w < WAYS; w++) begin
        cnt[w]       <= '0;
        way_max[w]   <= '0;
        way_max_v[w] <= 1'b0;
        acc[w]       <= '0;
        acc_v[w]     <= 1'b0;
      end
    end else begin
      unique case (state)
        S_IDLE: begin
          if (valid) begin
            req <= '{order_id: order_id, quantity: quantity, price: price};
            idx <= '0;
            for (int w = 0; w < WAYS; w++) acc_v[w] <= 1'b0;
            unique case (req_type)
              REQ_ADD:      state <= S_ADD;
              REQ_DELETE:   state <= S_DELETE;
              REQ_DECREASE: state <= S_DECREASE;
              default:      state <= S_IDLE;
            endcase
          end
        end

        S_ADD: begin
          if (32'(cnt[add_way]) < ENTRIES) begin
            cnt[add_way] <= cnt[add_way] + CW'(1);
            if (beats(1'b1, req, way_max_v[add_way], way_max[add_way])) begin
              way_max[add_way]   <= req;
              way_max_v[add_way] <= 1'b1;
            end
            if (beats(1'b1, req, best_v, best)) begin
              best   <= req;
              best_v <= 1'b1;
            end
          end
          state <= S_IDLE;
        end

        S_DELETE: begin
          for (int w = 0; w < WAYS; w++) begin
            if (row_valid[w] && !(hit && WW'(w) == hit_w) &&
                beats(1'b1, rdata[w], acc_v[w], acc[w])) begin
              acc[w]   <= rdata[w];
              acc_v[w] <= 1'b1;
            end
          end
          if (hit) begin
            hit_way <= hit_w;
            state   <= S_SHIFT;
          end else if (32'(idx) + 1 >= 32'(max_cnt)) begin
            state <= S_IDLE;          // order id not in the book
          end else begin
            idx <= idx + CW'(1);
          end
        end

        S_SHIFT: begin
          if (shift_move) idx <= idx + CW'(1);
          acc[hit_way]   <= acc_next;
          acc_v[hit_way] <= acc_next_v;
          if (shift_last) begin
            cnt[hit_way]       <= cnt[hit_way] - CW'(1);
            way_max[hit_way]   <= acc_next;
            way_max_v[hit_way] <= acc_next_v;
            if (best_v && best.order_id == req.order_id) begin
              if (WAYS == 1) begin
                best   <= acc_next;
                best_v <= acc_next_v;
                state  <= S_IDLE;
              end else begin
                cmb   <= (hit_way == '0) ? acc_next   : way_max[0];
                cmb_v <= (hit_way == '0) ? acc_next_v : way_max_v[0];
                cmb_i <= WW'(1);
                state <= S_FIND_MAX;
              end
            end else begin
              state <= S_IDLE;
            end
          end
        end

        S_FIND_MAX: begin
          // Merge one way maximum per cycle.
          if (beats(way_max_v[cmb_i], way_max[cmb_i], cmb_v, cmb)) begin
            cmb   <= way_max[cmb_i];
            cmb_v <= 1'b1;
          end
          if (32'(cmb_i) == WAYS - 1) begin
            if (beats(way_max_v[cmb_i], way_max[cmb_i], cmb_v, cmb)) begin
              best   <= way_max[cmb_i];
              best_v <= 1'b1;
            end else begin
              best   <= cmb;
              best_v <= cmb_v;
            end
            state <= S_IDLE;
          end else begin
            cmb_i <= cmb_i + WW'(1);
          end
        end

        S_DECREASE: begin
          if (hit) begin
            if (dec_left == 0) begin
              idx   <= '0;        // remove it through the DELETE path
              state <= S_DELETE;
            end else begin
              if (way_max_v[hit_w] && way_max[hit_w].order_id == req.order_id)
                way_max[hit_w].quantity <= dec_left;
              if (best_v && best.order_id == req.order_id)
                best.quantity <= dec_left;
              state <= S_IDLE;
            end
          end else if (32'(idx) + 1 >= 32'(max_cnt)) begin
            state <= S_IDLE;
          end else begin
            idx <= idx + CW'(1);
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ready        = (state == S_IDLE);
    max_order_id = best_v ? best.order_id : '0;
    max_quantity = best_v ? best.quantity : '0;
    max_price    = best_v ? best.price    : '0;
    count        = '0;
    for (int w = 0; w < WAYS; w++) count = count + NW'(cnt[w]);
  end

  // A request must name exactly one operation.
  a_req_onehot: assert property (@(posedge clk) disable iff (!resetn)
    (valid && ready) |-> $onehot(req_type));

endmodule
