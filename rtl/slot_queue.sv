// slot_queue: the ./1/k queue as a single occupation register.
//
// When all customers are alike a queue needs no memory: a register holds the
// number of waiting cells and, once per slot, is updated from the number of
// arrivals, the buffer capacity and the number of cells the server takes:
//
//   kept   = min(occ + arrivals, capacity)      cells beyond capacity are lost
//   depart = min(kept, service)                 the server cannot take more
//   occ'   = kept - depart                      i.e. max(kept - service, 0)
//
// This is the chain + / min / -1 / max(.,0) of the reference emulator's circuit
// model; an arrival to a full buffer is lost even if a cell leaves in the same
// slot. `losses` and `departures` are those of the present slot.
//
// Interface and timing: `losses`, `departures` and `occ_next` are combinational
// from `occ` and the inputs; `occ` takes `occ_next` at the clock edge where
// `slot` is high. One slot may be one clock (slot tied high) or several.
// Reset empties the queue.
module slot_queue #(
  parameter int unsigned OCC_W = 9,   // holds capacities up to 2^OCC_W - 1
  parameter int unsigned ARR_W = 1,   // arrivals per slot
  parameter int unsigned SRV_W = 1    // services per slot
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             slot,
  input  logic [ARR_W-1:0] arrivals,
  input  logic [OCC_W-1:0] capacity,
  input  logic [SRV_W-1:0] service,
  output logic [OCC_W-1:0] occ,
  output logic [OCC_W-1:0] occ_next,
  output logic [ARR_W-1:0] losses,
  output logic [SRV_W-1:0] departures
);

  localparam int unsigned SUM_W = ((OCC_W > ARR_W) ? OCC_W : ARR_W) + 1;

  logic [SUM_W-1:0] sum, kept, lost;

  always_comb begin
    sum  = SUM_W'(occ) + SUM_W'(arrivals);
    kept = (sum > SUM_W'(capacity)) ? SUM_W'(capacity) : sum;
    lost = sum - kept;
    if (kept > SUM_W'(service)) departures = service;
    else                        departures = SRV_W'(kept);
    occ_next = OCC_W'(kept - SUM_W'(departures));
    losses   = ARR_W'(lost);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    occ <= '0;
    else if (slot) occ <= occ_next;
  end

endmodule
