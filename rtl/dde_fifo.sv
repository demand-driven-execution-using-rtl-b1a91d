// dde_fifo -- token queue with several write ports and one read port.
//
// Every pipeline of the processor starts with a queue that buffers the
// tokens other stages send it (ev-queue, op-queue, wb-queue and the frame
// allocation queues), because producers and consumers run at different
// rates. Several stages may insert into the same queue in one cycle; the
// writes of a cycle are stored in port order (port 0 first).
//
// Interface: wr_en/wr_data per write port; rd_en pops the head, which is
// always visible on rd_data when !empty (first-word fall-through). 'room' is
// high when at least NW entries are free, so a producer that checks it can
// never overflow the queue whatever the other producers do that cycle.
// Timing: a token written in cycle t can be read in cycle t+1.
// The depth and the number of write ports are this design's choices.
module dde_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 16,
  parameter int  NW    = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NW-1:0] wr_en,
  input  T              wr_data [NW],
  input  logic          rd_en,
  output T              rd_data,
  output logic          empty,
  output logic          room,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);

  T              mem [DEPTH];
  logic [AW-1:0] rptr, wptr;

  assign empty   = (count == 0);
  assign room    = (int'(count) <= DEPTH - NW);
  assign rd_data = mem[rptr];

  always_ff @(posedge clk) begin
    logic [AW:0] n;
    if (!rst_n) begin
      rptr  <= '0;
      wptr  <= '0;
      count <= '0;
    end else begin
      n = '0;
      for (int i = 0; i < NW; i++) begin
        if (wr_en[i]) begin
          mem[wptr + AW'(n)] <= wr_data[i];
          n = n + 1'b1;
        end
      end
      wptr  <= wptr + AW'(n);
      rptr  <= rptr + AW'(rd_en && !empty);
      count <= count + n - (AW+1)'(rd_en && !empty);
    end
  end

  // A producer must check 'room'; a consumer must not pop an empty queue.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (int'(count) + $countones(wr_en) - int'(rd_en && !empty)) <= DEPTH)
    else $error("dde_fifo overflow");

endmodule
