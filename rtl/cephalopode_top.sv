// Combinator graph-reduction processor: top level.
//
// A lazy functional program, compiled to a graph of combinators, is loaded
// into graph memory and evaluated by the reduction engine, which rewrites
// the graph in place. A garbage collector reclaims unreachable nodes while
// the program runs: it marks and sweeps a snapshot of the graph that the
// snapshot memory keeps for it, so the program never stops for a
// collection and the collector needs no write barrier.
//
//   reduction_engine --mem (priority)--> snapshot_mem <--mem-- gc_unit
//          |  alloc                        (2x graph memory,     |  free
//          v                                metadata bits)       v
//       free_list <------------------------------------------ sweep
//
// Host interface: while the engine is not running, host_req/host_we/
// host_addr/host_wdata access the graph memory (read data with host_rvalid
// one cycle later). host_init with host_next declares nodes 1..host_next-1
// as the loaded program and the rest as free. start with root_in evaluates
// the graph at root_in; done (with the head node on result) or error ends
// it. A collection starts when fewer than GC_THRESHOLD nodes are free, or
// on gc_force. Counters report how often each mechanism was used.
// The block structure follows the architecture; the host interface, the
// trigger of a collection and the threshold are this implementation's.
module cephalopode_top
  import ceph_pkg::*;
#(
  parameter int GC_THRESHOLD = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  // host access to graph memory
  input  logic        host_req,
  input  logic        host_we,
  input  ptr_t        host_addr,
  input  node_t       host_wdata,
  output logic        host_rvalid,
  output node_t       host_rdata,
  input  logic        host_init,
  input  ptr_t        host_next,
  // evaluation control
  input  logic        start,
  input  ptr_t        root_in,
  input  logic        gc_force,
  output logic        busy,
  output logic        done,
  output logic        error,
  output logic [1:0]  err_code,
  output node_t       result,
  output logic        gc_busy,
  output logic [AW:0] free_count,
  // statistics
  output logic [31:0] n_reductions,
  output logic [31:0] n_swaps,
  output logic [31:0] n_alloc_stalls,
  output logic [31:0] n_ind_follow,
  output logic [31:0] n_collections,
  output logic [31:0] n_freed,
  output logic [31:0] n_compressed,
  output logic [31:0] n_redirects
);
  // engine <-> memory
  logic  re_req, re_we, re_gnt, re_rvalid;
  ptr_t  re_addr;
  node_t re_wdata, re_rdata;
  // muxed port 0 (engine or host)
  logic  p0_req, p0_we, p0_gnt, p0_rvalid;
  ptr_t  p0_addr;
  node_t p0_wdata, p0_rdata;
  // collector <-> memory
  logic  gc_req, gc_we, gc_snap, gc_gnt, gc_rvalid;
  ptr_t  gc_addr;
  node_t gc_wdata, gc_rdata;
  // allocation
  logic  alloc_req, alloc_gnt;
  ptr_t  alloc_addr;
  logic  free_valid, q_alloc;
  ptr_t  free_addr, q_addr;
  // snapshot
  logic  snap_req, snap_ack, take_snapshot, redirect;
  ptr_t  roots [NROOTS];
  logic  host_rd_q;

  reduction_engine u_re (
    .clk, .rst_n, .start, .root_in, .busy, .done, .result, .error, .err_code,
    .mem_req(re_req), .mem_we(re_we), .mem_addr(re_addr), .mem_wdata(re_wdata),
    .mem_gnt(re_gnt), .mem_rvalid(re_rvalid), .mem_rdata(re_rdata),
    .alloc_req, .alloc_gnt, .alloc_addr,
    .snap_req, .snap_ack, .roots,
    .n_reductions, .n_swaps, .n_alloc_stalls, .n_ind_follow
  );

  // the host owns port 0 whenever the engine is not running
  always_comb begin
    if (busy) begin
      p0_req = re_req;   p0_we = re_we;   p0_addr = re_addr;   p0_wdata = re_wdata;
    end else begin
      p0_req = host_req; p0_we = host_we; p0_addr = host_addr; p0_wdata = host_wdata;
    end
  end
  assign re_gnt    = busy && p0_gnt;
  assign re_rvalid = p0_rvalid && !host_rd_q;
  assign re_rdata  = p0_rdata;
  assign host_rvalid = p0_rvalid && host_rd_q;
  assign host_rdata  = p0_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) host_rd_q <= 1'b0;
    else        host_rd_q <= !busy && host_req && !host_we;
  end

  snapshot_mem u_mem (
    .clk, .rst_n, .take_snapshot,
    .re_req(p0_req), .re_we(p0_we), .re_addr(p0_addr), .re_wdata(p0_wdata),
    .re_gnt(p0_gnt), .re_rvalid(p0_rvalid), .re_rdata(p0_rdata),
    .gc_req, .gc_we, .gc_snap, .gc_addr, .gc_wdata,
    .gc_gnt, .gc_rvalid, .gc_rdata,
    .redirect
  );

  free_list u_fl (
    .clk, .rst_n, .init(host_init), .init_next(host_next),
    .alloc_req, .alloc_gnt, .alloc_addr,
    .free_valid, .free_addr, .q_addr, .q_alloc, .free_count
  );

  logic gc_start;
  assign gc_start = busy && (gc_force || free_count < (AW+1)'(GC_THRESHOLD));

  gc_unit u_gc (
    .clk, .rst_n, .start(gc_start), .busy(gc_busy),
    .snap_req, .snap_ack, .take_snapshot, .roots,
    .mem_req(gc_req), .mem_we(gc_we), .mem_snap(gc_snap), .mem_addr(gc_addr),
    .mem_wdata(gc_wdata), .mem_gnt(gc_gnt), .mem_rvalid(gc_rvalid), .mem_rdata(gc_rdata),
    .alloc_evt(alloc_req && alloc_gnt), .alloc_evt_addr(alloc_addr),
    .free_valid, .free_addr, .q_addr, .q_alloc,
    .n_collections, .n_freed, .n_compressed
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        n_redirects <= '0;
    else if (redirect) n_redirects <= n_redirects + 1;
  end
endmodule
