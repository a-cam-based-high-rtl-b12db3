// tb_dispatcher: the testbench plays the FIFO (a queue) and checks each
// dispatch: single, multicast and broadcast entries reach exactly their ports
// one clock after the pop when QoS is good; a congested target port makes the
// head go to the tail, after which nothing is taken for NET_UP_TIME clocks;
// broadcast mode sends every packet to all ports. QoS and mode act one clock
// after they change (the registry samples them).
module tb_dispatcher;
  import vnp_pkg::*;
  localparam int UP = 5;
  logic clk = 0, rst = 1, empty, bcast = 0, pop, requeue;
  logic [NPORTS-1:0] qos = '0, termn_valid;
  sched_entry_t head;
  packet_t termn [NPORTS];
  sched_entry_t q [$];
  int checks = 0, failures = 0, n_req = 0, n_single = 0, n_multi = 0, n_broad = 0, n_bmode = 0;

  dispatcher #(.NET_UP_TIME(UP)) dut (.*);
  always #5 clk = ~clk;

  // FIFO outputs, refreshed once per clock after the model has been updated
  task automatic show_fifo();
    empty = (q.size() == 0);
    head  = empty ? '0 : q[0];
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NPORTS-1:0] ref_tgt(sched_entry_t e, logic b);
    if (b) return '1;
    case (e.dest.mode)
      CAST_SINGLE: return NPORTS'(1 << e.dest.port);
      CAST_MULTI:  return e.dest.mask;
      default:     return '1;
    endcase
  endfunction

  initial begin
    sched_entry_t e;
    logic [NPORTS-1:0] qos_q, exp_tgt, sent;
    logic b_q;
    packet_t pkt_sent;
    int since_req = 1000;
    qos_q = '0; b_q = 0;
    show_fifo();
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 4000; t++) begin
      // keep the queue supplied
      if (q.size() < 4 && $urandom_range(1)) begin
        e.pkt  = {8{$urandom}};
        e.dest.mode = cast_mode_e'($urandom_range(2));
        e.dest.port = PORT_W'($urandom);
        e.dest.mask = NPORTS'($urandom_range(1, 15));
        q.push_back(e);
      end
      if (t % 50 == 0) qos = (($urandom_range(2) == 0) ? NPORTS'($urandom) : '1);
      if (t % 300 == 0) bcast = (t % 900 == 600);
      show_fifo();
      #1;
      // decide what the dispatcher must do this clock (registry = last clock's inputs)
      if (!empty && since_req >= UP) begin
        exp_tgt = ref_tgt(q[0], b_q);
        checks++;
        if (!pop) begin failures++; $display("t=%0d no pop", t); end
        if ((exp_tgt & ~qos_q) != 0) begin
          checks++;
          if (!requeue) begin failures++; $display("t=%0d expected requeue", t); end
          e = q.pop_front(); q.push_back(e); n_req++; since_req = 0;
          sent = '0;
        end else begin
          checks++;
          if (requeue) begin failures++; $display("t=%0d unexpected requeue", t); end
          e = q.pop_front(); sent = exp_tgt; pkt_sent = e.pkt; since_req++;
          if (b_q) n_bmode++;
          else if (e.dest.mode == CAST_SINGLE) n_single++;
          else if (e.dest.mode == CAST_MULTI) n_multi++;
          else n_broad++;
        end
      end else begin
        checks++;
        if (pop || requeue) begin failures++; $display("t=%0d pop while waiting/empty", t); end
        sent = '0; since_req++;
      end
      qos_q = qos; b_q = bcast;
      @(negedge clk);
      checks++;
      if (termn_valid !== sent) begin failures++; $display("t=%0d valid=%b exp %b", t, termn_valid, sent); end
      for (int i = 0; i < NPORTS; i++)
        if (sent[i]) begin
          checks++;
          if (termn[i] !== pkt_sent) begin failures++; $display("t=%0d port %0d data", t, i); end
        end
    end
    checks++;
    if (n_req == 0 || n_single == 0 || n_multi == 0 || n_broad == 0 || n_bmode == 0) begin
      failures++; $display("coverage req=%0d single=%0d multi=%0d broad=%0d bmode=%0d", n_req, n_single, n_multi, n_broad, n_bmode);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
