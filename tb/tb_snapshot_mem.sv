// Self-checking test of the snapshot memory.
//
// A reference model keeps the live graph and, at every snapshot, a full copy
// of it. Random traffic on both ports (program reads and writes, collector
// snapshot reads, live reads and writes) over a small address window, with
// snapshots taken now and then, is checked against the model: live reads
// must return the latest write, snapshot reads the value at the last
// snapshot. Redirections are counted against the model's "first write after
// a snapshot" and the read latency is checked to be one cycle.
module tb_snapshot_mem;
  import ceph_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int WIN = 32;

  logic  take_snapshot;
  logic  re_req, re_we, re_gnt, re_rvalid;
  ptr_t  re_addr;
  node_t re_wdata, re_rdata;
  logic  gc_req, gc_we, gc_snap, gc_gnt, gc_rvalid;
  ptr_t  gc_addr;
  node_t gc_wdata, gc_rdata;
  logic  redirect;

  snapshot_mem dut (.*);

  int checks = 0, failures = 0;
  node_t live_m [WIN];
  node_t snap_m [WIN];
  logic  wr_m   [WIN];   // written since the last snapshot
  node_t exp_gc;
  int    redirects_seen = 0, redirects_exp = 0, snaps = 0, gc_snap_reads = 0;

  function automatic node_t rnd_node();
    node_t n;
    n.tag = tag_t'($urandom_range(0, 3));
    n.left = $urandom;
    n.right = ptr_t'($urandom);
    n.back = ptr_t'($urandom);
    return n;
  endfunction

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    take_snapshot = 0; re_req = 0; re_we = 0; re_addr = '0; re_wdata = '0;
    gc_req = 0; gc_we = 0; gc_snap = 0; gc_addr = '0; gc_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // fill the window
    for (int a = 0; a < WIN; a++) begin
      re_req = 1; re_we = 1; re_addr = ptr_t'(a); re_wdata = rnd_node();
      live_m[a] = re_wdata; snap_m[a] = re_wdata; wr_m[a] = 1'b1;
      @(negedge clk);
    end
    // first snapshot of the filled window (snapshot reads before any
    // snapshot are undefined)
    re_req = 0; take_snapshot = 1;
    for (int a = 0; a < WIN; a++) wr_m[a] = 1'b0;
    @(negedge clk);
    take_snapshot = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      // stimulus for this cycle
      re_req  = ($urandom_range(0, 2) == 0);
      re_we   = $urandom_range(0, 1);
      re_addr = ptr_t'($urandom_range(0, WIN - 1));
      re_wdata = rnd_node();
      gc_req  = ($urandom_range(0, 1) == 0);
      gc_we   = ($urandom_range(0, 4) == 0);
      gc_snap = !gc_we && $urandom_range(0, 3) != 0;
      gc_addr = ptr_t'($urandom_range(0, WIN - 1));
      gc_wdata = rnd_node();
      take_snapshot = !take_snapshot && ($urandom_range(0, 60) == 0);
      #1;
      // grant rules
      checks++;
      if (re_gnt !== re_req || gc_gnt !== (gc_req && !re_req)) begin
        failures++; $display("FAIL: grant re=%0b gc=%0b", re_gnt, gc_gnt);
      end
      @(posedge clk);
      // read data of the access made at this edge arrives one cycle later,
      // i.e. right after this edge
      #1;
      if (re_req) begin
        if (re_we) begin
          if (!wr_m[re_addr]) redirects_exp++;
          live_m[re_addr] = re_wdata; wr_m[re_addr] = 1'b1;
        end else begin
          checks++;
          if (!re_rvalid || re_rdata !== live_m[re_addr]) begin
            failures++; $display("FAIL: program read mismatch at cycle %0d", cyc);
          end
        end
      end else if (gc_req) begin
        if (gc_we) begin
          if (!wr_m[gc_addr]) redirects_exp++;
          live_m[gc_addr] = gc_wdata; wr_m[gc_addr] = 1'b1;
        end else begin
          checks++;
          exp_gc = gc_snap ? snap_m[gc_addr] : live_m[gc_addr];
          if (gc_snap) gc_snap_reads++;
          if (!gc_rvalid || gc_rdata !== exp_gc) begin
            failures++; $display("FAIL: collector read mismatch at cycle %0d", cyc);
          end
        end
      end
      if (take_snapshot) begin
        snaps++;
        for (int a = 0; a < WIN; a++) begin snap_m[a] = live_m[a]; wr_m[a] = 1'b0; end
      end
      @(negedge clk);
    end
    re_req = 0; gc_req = 0; take_snapshot = 0;
    @(negedge clk);
    checks++;
    if (redirects_seen != redirects_exp || snaps == 0 || gc_snap_reads == 0) begin
      failures++;
      $display("FAIL: redirects %0d expected %0d, snapshots %0d", redirects_seen, redirects_exp, snaps);
    end
    $display("snapshots=%0d redirects=%0d snapshot_reads=%0d", snaps, redirects_seen, gc_snap_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && redirect) redirects_seen++;
endmodule
