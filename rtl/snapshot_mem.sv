// Snapshot memory: graph memory that keeps a frozen image of the graph for
// the concurrent garbage collector while the program keeps rewriting it.
//
// Every logical node address a owns two physical slots, {0,a} and {1,a}, so
// the physical RAM is twice the usable size. Two on-chip metadata bits per
// address, held in flip-flops and read combinationally, say where the node
// lives:
//   cur[a] - which slot holds the node as the running program sees it;
//   wsn[a] - the node has been written since the last snapshot.
// Taking a snapshot only clears all wsn bits at once, so it costs one cycle
// whatever the memory size. The first write to a node after a snapshot
// (wsn[a] = 0) is redirected to the other slot and flips cur[a], leaving the
// snapshot image untouched; later writes before the next snapshot go to the
// new slot directly. A snapshot read returns slot ~cur[a] if the node was
// written since the snapshot and slot cur[a] otherwise.
// The lazy copy, the doubled memory and the fast metadata memory follow the
// architecture; the two-bit encoding is this implementation's choice.
//
// Two request ports share the single-port RAM; the reduction-engine port
// (re_*) always wins, the collector port (gc_*) is served in free cycles.
// A request is accepted in the cycle its gnt is high; read data arrives with
// rvalid in the next cycle. gc_snap selects a snapshot read; collector
// writes (used for indirection compression) go to the current graph, with
// the same redirection as program writes. A write accepted in the cycle a
// snapshot is taken still belongs to the image the snapshot captures.
// Before the first snapshot after reset, snapshot reads are undefined.
module snapshot_mem
  import ceph_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  take_snapshot,
  // reduction engine / host port
  input  logic  re_req,
  input  logic  re_we,
  input  ptr_t  re_addr,
  input  node_t re_wdata,
  output logic  re_gnt,
  output logic  re_rvalid,
  output node_t re_rdata,
  // garbage collector port
  input  logic  gc_req,
  input  logic  gc_we,
  input  logic  gc_snap,
  input  ptr_t  gc_addr,
  input  node_t gc_wdata,
  output logic  gc_gnt,
  output logic  gc_rvalid,
  output node_t gc_rdata,
  // one-cycle pulse when a write was redirected to the alternate slot
  output logic  redirect
);
  logic [NODES-1:0] cur_q, wsn_q;

  logic             sel_gc, acc, acc_we, acc_snap;
  ptr_t             acc_addr;
  node_t            acc_wdata;
  logic             slot;
  logic             fresh;
  logic [AW:0]      paddr;
  logic [NODE_W-1:0] rword;
  logic             rd_re_q, rd_gc_q;

  assign re_gnt = re_req;
  assign gc_gnt = gc_req && !re_req;
  assign sel_gc = gc_gnt;
  assign acc    = re_req || gc_req;

  always_comb begin
    acc_we    = sel_gc ? gc_we    : re_we;
    acc_snap  = sel_gc ? gc_snap  : 1'b0;
    acc_addr  = sel_gc ? gc_addr  : re_addr;
    acc_wdata = sel_gc ? gc_wdata : re_wdata;
    fresh     = !wsn_q[acc_addr];   // not written since the snapshot
    if (acc_we)        slot = fresh ? ~cur_q[acc_addr] : cur_q[acc_addr];
    else if (acc_snap) slot = fresh ? cur_q[acc_addr] : ~cur_q[acc_addr];
    else               slot = cur_q[acc_addr];
    paddr     = {slot, acc_addr};
  end

  assign redirect = acc && acc_we && fresh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q   <= '0;
      wsn_q   <= '1;   // no snapshot yet: nothing to preserve
      rd_re_q <= 1'b0;
      rd_gc_q <= 1'b0;
    end else begin
      rd_re_q <= re_req && !re_we;
      rd_gc_q <= gc_gnt && !gc_we;
      if (acc && acc_we && fresh) cur_q[acc_addr] <= ~cur_q[acc_addr];
      if (take_snapshot)          wsn_q <= '0;
      else if (acc && acc_we)     wsn_q[acc_addr] <= 1'b1;
    end
  end

  node_ram #(.DEPTH(2 * NODES), .WIDTH(NODE_W)) u_ram (
    .clk   (clk),
    .en    (acc),
    .we    (acc_we),
    .addr  (paddr),
    .wdata (acc_wdata),
    .rdata (rword)
  );

  assign re_rvalid = rd_re_q;
  assign gc_rvalid = rd_gc_q;
  assign re_rdata  = node_t'(rword);
  assign gc_rdata  = node_t'(rword);

  // Snapshot and program write in the same cycle are allowed; two snapshots
  // in back-to-back cycles would make the first one empty and are not.
  a_no_double_snap: assert property (@(posedge clk) disable iff (!rst_n)
    take_snapshot |=> !take_snapshot);
endmodule
