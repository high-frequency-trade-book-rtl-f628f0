# Bid-side order book builder for market data

This is an FPGA peripheral that keeps a live order book for four stocks. It
receives a stream of NASDAQ-ITCH-style messages (add an order, delete an
order, reduce an order's quantity). For each stock it always shows the
**best bid**: the resting buy order with the highest price. A processor
writes each 40-byte message into the peripheral over an 8-bit
memory-mapped bus. The hardware decodes it, routes it to that stock's book,
and updates the book and its best bid in a small, known number of clock
cycles.

The key design choice is in the order book. Orders are kept in a plain
memory and searched linearly. The memory is split into several **ways**
that are searched in parallel, so every search costs about a quarter of
what one memory would cost. This also covers the slow path of removing the
best bid, which would normally need a full rescan.

```
 bus (8-bit, 6-bit address)
        |
  +-----v---------+   ff_buffer[319:0]   +--------+    +-------------+
  | register_bank |--------------------->| parser |--->| parser_ctrl |--+ cmd, master_valid
  |  40 msg bytes |<-- buffer_taken -----+--------+    +-------------+  |
  |  BUFFER_NOT_  |                                     ^ system_free   |
  |  EMPTY flag   |                                     |               |
  +---------------+                        +------------+---------------+
                                           |   order_book x 4 (stocks 1..4)
                                           |   each: 4 x book_way_mem (250 x 128 bit)
                                           +--> max_order_id / max_quantity / max_price
```

`vga_ball` is the top: the bus slave plus `book_builder`. `book_builder`
holds the parser, its controller and the four order books.

## Message format and decoding

A message is 40 bytes, with multi-byte fields big-endian:

| bytes  | field                  | used by the hardware                   |
|--------|------------------------|----------------------------------------|
| 0      | message type           | `'A'` add, `'D'` delete, `'X'` decrease |
| 1-8    | timestamp              | no                                     |
| 9-12   | order reference number | order id                               |
| 13-16  | transaction id         | no                                     |
| 17-20  | order book id          | bits [1:0] select the stock (0 = stock 1) |
| 21     | side                   | only `'B'` (buy) is processed          |
| 22-25  | quantity               | quantity, or the amount removed for a decrease |
| 26-33  | price                  | price (64-bit unsigned)                |
| 34-37  | yield                  | no                                     |
| 38-39  | unused                 | no                                     |

`parser` is pure combinational logic. Its output `stock_activate` is 12 bits
wide, made of three one-hot bits per stock, in the order ADD, DELETE,
DECREASE. Stock 1 is in bits [11:9] and stock 4 in bits [2:0]. For example,
ADD on stock 2 is `12'b000100000000`. A sell-side message, or a message with
an unknown type, sets no bit and is dropped. The three bits of a stock are
that book's `req_type`: 4 = ADD, 2 = DELETE, 1 = DECREASE.

## Bus interface and message hand-off

| address | access | meaning |
|---------|--------|---------|
| 0-39    | R/W    | message byte *k* at address *k*; writes are ignored while BUFFER_NOT_EMPTY is set |
| 40      | R/W    | BUFFER_NOT_EMPTY: write 1 to hand the message over; hardware clears it when taken |
| 41      | R      | READPORT: 1 when the buffer is free for the next message |

Reads return data in the same cycle. `reset` is active high and
synchronous.

The software loop is:
1. Poll READPORT until it reads 1.
2. Write bytes 0 to 39.
3. Write 1 to address 40.

`parser_ctrl` takes a message only when the flag is set **and all four books
are idle** (`system_free`). In that cycle it latches the decoded command and
pulses `buffer_taken`. In the next cycle it raises `master_valid`, and the
addressed book accepts the request.

An ADD therefore appears in the book's count three clock edges after the
flag is set: take, issue, add. Reading the best bid back over the bus is not
part of the register map. The best bid, order count and `system_free` of
each stock are output ports of the top.

## The order book

Each `order_book` holds `DEPTH` = 1000 orders in `WAYS` = 4 ways of 250
rows. Each row is 128 bits: `{order_id[31:0], quantity[31:0], price[63:0]}`.
Within a way the valid rows are packed from row 0 upward in arrival order,
and a per-way counter gives the fill level. Every way reads **the same row
index** in a cycle, through the asynchronous read port of `book_way_mem`. At
most one row is written per cycle.

The book has a valid/ready handshake: `ready` is high only in IDLE, and a
request is taken on `valid && ready`. The controller states are listed below
with their encodings, which are also the values of `state` seen in
simulation.

* **IDLE (0)**: waits for a request and latches it.
* **ADD (1)**: appends the order to the least-filled way (the lowest
  index wins a tie) and compares it with that way's maximum and the book's
  best bid. An ADD to a full book is ignored. This takes one cycle.
* **DELETE (2)**: searches row *j* of every way in cycle *j* for the order
  id. A request for an id that is not in the book ends when the fullest way
  has been searched.
* **SHIFT (3)**: closes the gap in the way that held the order, moving one
  row down per cycle.
* **FIND_MAX (4)**: runs only when the deleted order was the best bid. It
  merges the per-way maxima, one way per cycle.
* **DECREASE (5)**: searches like DELETE and subtracts the request's
  quantity in place. If the result is zero or less, the order is removed
  through DELETE.

### Why deleting the best bid is cheap

Each way keeps a register with its own maximum. A DELETE searches the way
up to the matching row, and SHIFT then reads every row above it. Between
them, the two passes read every remaining row of that way exactly once.
The way's new maximum is rebuilt on the fly during those passes, at no extra
cost. If the deleted order was the book's best bid, only the four way
maxima have to be compared. FIND_MAX does this with one comparator in
WAYS-1 = 3 cycles. The other ways are never rescanned.

### Latency

"Busy cycles" below means cycles with `ready` low. Let *c* be the number of
rows in the way that holds the order, and *j* the order's row in that way.

| request | busy cycles | 4 ways, N = 1000 resting orders |
|---|---|---|
| ADD | 1 | 1 |
| DELETE, not the best bid | (j+1) + max(c-1-j, 1) | 250 = N/4 |
| DELETE of the best bid | the same + (WAYS-1) | 253 = N/4 + 3 for the best bid in row 0 |
| DECREASE (quantity stays > 0) | j+1 | depends on the position: about a quarter of what one memory would take |
| DECREASE to zero | (j+1) + DELETE cost | |
| id not in the book | max(rows in the fullest way, 1) | |

With a single memory (WAYS = 1), a DELETE costs about N cycles. A
full-rescan design would take N + N - 1 cycles to delete the best bid; here
it takes about N, because the rescan is folded into the delete pass.

### Choices and limits

* Prices compare as unsigned 64-bit integers, and strictly greater wins.
  Within a way the earlier order keeps the best-bid place on a tie; across
  ways the lower way wins. So strict time priority among equal prices is
  only kept within a way.
* Order ids must be unique within a book. A duplicate id is matched in the
  lowest row, lowest way first.
* When a book is empty its max outputs read zero, and `count` reads zero.
* Only the buy side is kept, because the books track the highest price. The
  SIDE parameter of `parser` selects the side.
* A message waits until all four books are idle, not just the one it
  addresses. This is simple, but a slow delete on one stock stalls the
  others.

## Departures from the source design

* The source design states that it was built with 10 ways, but its
  measured cycle counts are for 4. The default here is 4; `WAYS = 10` also
  divides 1000 and works (DELETE 100 cycles, DELETE of the best bid 109).
* The source uses a `'A'` message type for add orders. The codes for delete
  (`'D'`) and decrease (`'X'`) are taken from the ITCH convention.
* The stock is selected by the low two bits of the order book id. This
  mapping is an assumption.
* The register map (one byte per address) replaces a per-field register
  layout whose 8-bit accesses could not carry the 32- and 64-bit fields.
* A 64-bit word split into 2 + 62 bits, which the source shows without
  explanation, is not used.
* The market simulator, the software queue and driver on the processor,
  and the Ethernet/TCP path are software or platform parts and are not part
  of this RTL.

## Throughput

The bus is 8 bits wide, so loading one message takes 41 writes, and the
books need at least 3 more cycles. That is about 44 cycles per message. A
feed of 32 Gb/s, which is 100 million 40-byte messages per second, would
need a clock of about 4.4 GHz. This design is far from that, mostly because
of the byte-wide bus.

## Files

| file | content |
|---|---|
| `rtl/book_pkg.sv` | entry and command types, request codes, message offsets, register addresses, state encoding |
| `rtl/book_way_mem.sv` | one way of storage (1 asynchronous read, 1 synchronous write) |
| `rtl/order_book.sv` | the per-stock book and its controller |
| `rtl/parser.sv` | combinational message decoder |
| `rtl/parser_ctrl.sv` | hand-off from the buffer to the books |
| `rtl/register_bank.sv` | bus slave and message buffer |
| `rtl/book_builder.sv` | parser + controller + four books |
| `rtl/vga_ball.sv` | top |

Parameters: `DEPTH` (default 1000) and `WAYS` (default 4) on `vga_ball`,
`book_builder` and `order_book`. DEPTH must be a multiple of WAYS.

## Simulation

Each testbench checks itself and ends with a `TB_RESULT checks=N
failures=M` line.

| testbench | what it checks |
|---|---|
| `tb_order_book` | 3000 random requests against a per-way reference model, 40 orders over 4 ways: the best bid, the count and the exact busy cycles of every request |
| `tb_cycle_table` | a default-size book (1000 orders, 4 ways): ADD 1, DELETE 250, DELETE of the best bid 253, DECREASE 11 cycles; beside it a 10-way book: 1, 100, 109, 5 cycles |
| `tb_book_way_mem` | memory read-back, write enable, out-of-range reads |
| `tb_parser` | field extraction and `stock_activate` for every type, side and stock |
| `tb_parser_ctrl` | the hand-off protocol against a cycle-level model |
| `tb_register_bank` | bus writes and reads, the flag protocol, write protection |
| `tb_book_builder` | routing, the 3-edge ADD latency and the best bids of all four stocks |
| `tb_vga_ball` | end to end over the bus at default size: fills stock 1 past 1000 orders, then 3000 mixed messages on all stocks |

To run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/book_pkg.sv tb/tb_vga_ball.sv --top-module tb_vga_ball
./obj_dir/Vtb_vga_ball
```

The other testbenches are built the same way with their own top module.
The full-size end-to-end test runs in well under a second of simulation
time.
