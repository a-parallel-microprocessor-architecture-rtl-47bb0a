// tb_task_flow: the example task-flow program run on the whole machine.
//
// Runs the small example job that illustrates task flow scheduling on the
// full four-node machine at its default sizes. The processors are modelled
// by tasks in this file; everything they do goes through the real hardware:
// bus requests through the node latch, waits for the arbiter's grant, heap
// reads and writes in main memory, the token pulse and the idle-node
// interrupt, and local memory for the work of each task.
//
// The job (task: mother, dependency):
//   A                     daughters AA, AB, AC
//   AA  : A               daughters AAA, AAB, AAC
//   AB  : A, needs AA     daughter AAA' (its call of AAA, a second instance)
//   AC  : A, needs AA
//   AAA, AAB, AAC : AA
// Heap in main memory: one state word per task (0 absent, 1 listed,
// 2 running, 3 finished but waiting for its daughters, 4 removed), and one
// result word per task in the data area.
//
// Each processor: waits for the token interrupt; takes the bus (sets BRQ;
// its first heap read waits for the grant); searches the heap for a listed
// task whose dependency has been removed; marks it running, lists its
// daughters, sets IU and releases the bus; does the work in local memory; takes the bus again, stores the
// result and removes the task if its daughters are all removed (else leaves
// it waiting), then, as it removes a task, looks at the mother and removes
// it too if it was only waiting for this daughter; clears IU and releases.
// A node whose search found nothing ignores the token caused by its own
// release. The job ends when A is removed; a node that sees this sets IU, so
// the token passes on to the others, and stops.
//
// Checks: every task runs exactly once, no task starts before its
// dependency is removed, no mother is removed before her daughters, A is
// removed last, every result in main memory is right, at most one node is
// inside the heap at a time, and more than one node did work. Counted, and a
// failure if never seen: token pulses, idle-node interrupts, bus waits,
// hand-overs between nodes, blocked dependencies, mothers left waiting.
module tb_task_flow;
  import tf_pkg::*;
  localparam int NODES = 4;
  localparam int NT    = 8;

  logic clk = 0, rst_n = 0;
  sbus_req_t         cpu_req   [NODES];
  logic              cpu_ready [NODES];
  logic [DATA_W-1:0] cpu_rdata [NODES];
  logic              cpu_hold  [NODES];
  logic              cpu_hlda  [NODES];
  logic              cpu_nmi   [NODES];
  logic [7:4]        brq_ext = '0;
  logic [1:0]        baud_sel = 2'd0;
  logic pclk, baud_clk, usart_cs, usart_cd, usart_wr, usart_rd, disp_wr;
  logic [7:0] usart_wdata, usart_rdata = 8'h00, disp_wdata, ctrl_q, bg;
  logic [3:0] disp_addr;
  logic boot, real_mode, token, dma_busy;
  logic [NODES-1:0] in_use;
  sbus_req_t bus_req;

  tf_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- the job ----------------
  localparam logic [19:0] HEAP = 20'h41000;   // state word per task
  localparam logic [19:0] DATA = 20'h42000;   // result word per task
  localparam logic [19:0] WORK = 20'h02000;   // scratch area in local memory
  localparam logic [19:0] P_BRQ = 20'h00080;  // node-local latch bit 0
  localparam logic [19:0] P_IU  = 20'h00082;  // node-local latch bit 1

  localparam logic [15:0] ABSENT = 0, LISTED = 1, RUNNING = 2, WAITING = 3, REMOVED = 4;

  int    mother [NT] = '{-1, 0, 0, 0, 1, 1, 1, 2};
  int    dep    [NT] = '{-1, -1, 1, 1, -1, -1, -1, -1};
  int    work   [NT] = '{4, 40, 30, 60, 90, 70, 50, 80};   // words of local work
  string name   [NT] = '{"A", "AA", "AB", "AC", "AAA", "AAB", "AAC", "AAA'"};

  function automatic logic [15:0] result(input int t);
    logic [15:0] s = 16'h0;
    for (int k = 0; k < work[t]; k++) s += 16'(t * 31 + k * 7);
    return s;
  endfunction

  // ---------------- processor models ----------------
  for (genvar n = 0; n < NODES; n++) begin : g_cpu
    initial begin cpu_req[n] = SBUS_IDLE; cpu_hlda[n] = 1'b0; end
    always @(posedge clk) begin
      if (!rst_n) cpu_hlda[n] <= 1'b0;
      else        cpu_hlda[n] <= cpu_hold[n] && !cpu_req[n].cyc;
    end
  end

  task automatic cyc(input int n, input logic we, input logic mio,
                     input logic [19:0] a, input logic [15:0] wd,
                     output logic [15:0] rd);
    int t;
    @(negedge clk);
    while (cpu_hold[n] || cpu_hlda[n]) @(negedge clk);
    cpu_req[n] = '{cyc: 1'b1, we: we, mio: mio, addr: a, wdata: wd, be: 2'b11};
    t = 0;
    #1;
    while (!cpu_ready[n] && t < 5000) begin @(negedge clk); t++; #1; end
    if (t >= 5000) begin failures++; $display("FAIL node %0d cycle hung at %h", n, a); end
    rd = cpu_rdata[n];
    @(negedge clk);
    cpu_req[n] = SBUS_IDLE;
  endtask

  task automatic wr(input int n, input logic mio, input logic [19:0] a, input logic [15:0] d);
    logic [15:0] rd;
    cyc(n, 1'b1, mio, a, d, rd);
  endtask

  task automatic rdw(input int n, input logic mio, input logic [19:0] a, output logic [15:0] d);
    cyc(n, 1'b0, mio, a, 16'h0, d);
  endtask

  // Heap critical section bookkeeping.
  int in_heap = 0, max_in_heap = 0;

  task automatic acquire(input int n);
    logic [15:0] s;
    wr(n, 1'b0, P_BRQ, 16'h1);
    rdw(n, 1'b1, HEAP, s);                 // READY waits for the grant
    in_heap++;
    if (in_heap > max_in_heap) max_in_heap = in_heap;
  endtask

  task automatic release_bus(input int n);
    in_heap--;
    wr(n, 1'b0, P_BRQ, 16'h0);
  endtask

  // Token interrupts taken by each node, and how many it has looked at.
  int   nmi_cnt  [NODES];
  int   nmi_seen [NODES];
  logic nmi_q    [NODES];
  int   n_poll = 0;
  always @(posedge clk) begin
    for (int i = 0; i < NODES; i++) begin
      if (!rst_n) nmi_cnt[i] <= 0;
      else if (cpu_nmi[i] && !nmi_q[i]) nmi_cnt[i] <= nmi_cnt[i] + 1;
      nmi_q[i] <= rst_n && cpu_nmi[i];
    end
  end

  // Sleep until the next token interrupt; a long sleep ends in a timeout
  // (counted) so that a lost token cannot hang the job.
  task automatic wait_token(input int n);
    int t = 0;
    @(negedge clk);
    while (nmi_cnt[n] == nmi_seen[n] && t < 4000) begin @(negedge clk); t++; end
    if (nmi_cnt[n] == nmi_seen[n]) n_poll++;
    nmi_seen[n] = nmi_cnt[n];
  endtask

  // Scheduling record, kept by the models for the checks.
  int  run_count [NT];
  int  run_node  [NT];
  time t_start   [NT];
  time t_removed [NT];
  int  n_blocked = 0, n_waiting = 0, n_mother_removed = 0;
  int  tasks_by_node [NODES];

  // Remove task t if all its daughters are removed, then its mother if she
  // was waiting only for t; otherwise leave t waiting.
  task automatic retire(input int n, input int t0);
    logic [15:0] s;
    int t = t0;
    bit all_done;
    forever begin
      all_done = 1;
      for (int i = 0; i < NT; i++) begin
        if (mother[i] == t) begin
          rdw(n, 1'b1, HEAP + 20'(2 * i), s);
          if (s != REMOVED) all_done = 0;
        end
      end
      if (!all_done) begin
        wr(n, 1'b1, HEAP + 20'(2 * t), WAITING);
        if (t == t0) n_waiting++;
        break;
      end
      wr(n, 1'b1, HEAP + 20'(2 * t), REMOVED);
      t_removed[t] = $time;
      if (t != t0) n_mother_removed++;
      if (mother[t] < 0) break;
      rdw(n, 1'b1, HEAP + 20'(2 * mother[t]), s);
      if (s != WAITING) break;
      t = mother[t];
    end
  endtask

  task automatic node_run(input int n);
    logic [15:0] s, sd, acc;
    int found;
    bit done = 0;
    while (!done) begin
      wait_token(n);
      acquire(n);
      rdw(n, 1'b1, HEAP, s);
      if (s == REMOVED) begin
        done = 1;
        wr(n, 1'b0, P_IU, 16'h1);          // pass later tokens on
        release_bus(n);
        break;
      end
      found = -1;
      for (int i = 0; i < NT && found < 0; i++) begin
        rdw(n, 1'b1, HEAP + 20'(2 * i), s);
        if (s == LISTED) begin
          if (dep[i] < 0) found = i;
          else begin
            rdw(n, 1'b1, HEAP + 20'(2 * dep[i]), sd);
            if (sd == REMOVED) found = i;
            else n_blocked++;
          end
        end
      end
      if (found < 0) begin
        release_bus(n);
        repeat (8) @(negedge clk);         // skip the token of our own release
        nmi_seen[n] = nmi_cnt[n];
        continue;
      end
      wr(n, 1'b1, HEAP + 20'(2 * found), RUNNING);
      run_count[found]++;
      run_node[found] = n;
      t_start[found]  = $time;
      tasks_by_node[n]++;
      for (int i = 0; i < NT; i++)
        if (mother[i] == found) wr(n, 1'b1, HEAP + 20'(2 * i), LISTED);
      wr(n, 1'b0, P_IU, 16'h1);
      release_bus(n);
      // The task's own work, in local memory only.
      for (int k = 0; k < work[found]; k++)
        wr(n, 1'b1, WORK + 20'(2 * k), 16'(found * 31 + k * 7));
      acc = 16'h0;
      for (int k = 0; k < work[found]; k++) begin
        rdw(n, 1'b1, WORK + 20'(2 * k), s);
        acc += s;
      end
      acquire(n);
      wr(n, 1'b1, DATA + 20'(2 * found), acc);
      retire(n, found);
      wr(n, 1'b0, P_IU, 16'h0);
      release_bus(n);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_token = 0, n_nmi = 0, n_wait = 0, n_handover = 0;
  logic [7:0] bg_q;
  logic tok_q;
  logic nmi_c [NODES];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NODES; i++) begin
      if (cpu_nmi[i] && !nmi_c[i]) n_nmi++;
      nmi_c[i] = cpu_nmi[i];
      if (cpu_req[i].cyc && !bg[i] && !is_local(cpu_req[i].addr) && cpu_req[i].mio) n_wait++;
    end
    if (!boot && bg_q != 0 && bg != 0 && bg != bg_q) n_handover++;
    if (token && !tok_q) n_token++;
    bg_q  = bg;
    tok_q = token;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] d;
  int busy_nodes;

  initial begin
    foreach (run_count[i]) begin
      run_count[i] = 0; run_node[i] = -1; t_start[i] = 0; t_removed[i] = 0;
    end
    foreach (tasks_by_node[i]) tasks_by_node[i] = 0;
    foreach (nmi_seen[i]) nmi_seen[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Short start-up: node 0 keeps the bus, leaves boot mode, sets up the
    // heap with A as its only element and lets go of the bus.
    wr(0, 1'b0, P_BRQ, 16'h1);
    wr(0, 1'b0, 20'h00020, 16'h0001);      // grant byte: node 0
    wr(0, 1'b0, 20'h00010, 16'h0001);      // Real <- 1
    wr(0, 1'b0, 20'h00012, 16'h0001);      // Boot <- 0
    check(!boot && bg == 8'h01, "start-up: normal mode, node 0 owns the bus");
    for (int i = 0; i < NT; i++) begin
      wr(0, 1'b1, HEAP + 20'(2 * i), ABSENT);
      wr(0, 1'b1, DATA + 20'(2 * i), 16'h0);
    end
    wr(0, 1'b1, HEAP, LISTED);
    wr(0, 1'b0, P_BRQ, 16'h0);

    fork
      node_run(0);
      node_run(1);
      node_run(2);
      node_run(3);
    join

    // Results, read back through node 0.
    acquire(0);
    for (int i = 0; i < NT; i++) begin
      rdw(0, 1'b1, HEAP + 20'(2 * i), d);
      check(d == REMOVED, $sformatf("task %s removed from the heap", name[i]));
      rdw(0, 1'b1, DATA + 20'(2 * i), d);
      check(d == result(i), $sformatf("task %s result in main memory", name[i]));
    end
    release_bus(0);

    for (int i = 0; i < NT; i++) begin
      check(run_count[i] == 1, $sformatf("task %s ran exactly once", name[i]));
      if (dep[i] >= 0)
        check(t_start[i] > t_removed[dep[i]],
              $sformatf("task %s started after %s was removed", name[i], name[dep[i]]));
      if (mother[i] >= 0)
        check(t_removed[mother[i]] > t_removed[i],
              $sformatf("mother of %s removed after it", name[i]));
    end
    check(max_in_heap == 1, "one node at a time inside the heap");
    busy_nodes = 0;
    foreach (tasks_by_node[i]) if (tasks_by_node[i] > 0) busy_nodes++;
    check(busy_nodes >= 2, "more than one node ran tasks");

    $display("tasks per node %0d %0d %0d %0d, token pulses %0d, idle interrupts %0d",
             tasks_by_node[0], tasks_by_node[1], tasks_by_node[2], tasks_by_node[3],
             n_token, n_nmi);
    $display("bus waits %0d, hand-overs %0d, blocked dependencies %0d, mothers left waiting %0d, removed later %0d, timeouts %0d",
             n_wait, n_handover, n_blocked, n_waiting, n_mother_removed, n_poll);
    for (int i = 0; i < NT; i++)
      $display("  %-5s node %0d start %0t removed %0t", name[i], run_node[i], t_start[i], t_removed[i]);
    check(n_token > 0, "token pulses happened");
    check(n_nmi > 0, "idle-node interrupts happened");
    check(n_wait > 0, "bus waits happened");
    check(n_handover > 0, "bus hand-overs happened");
    check(n_blocked > 0, "a dependency blocked a task");
    check(n_waiting > 0, "a mother was left waiting for her daughters");
    check(n_mother_removed > 0, "a waiting mother was removed by a daughter's node");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
