// ivc_fault_detector: time-out driven detector of a faulty link, one per
// input virtual circuit (the downstream half of the link monitor).
//
// Three transition detectors, enabled by start, watch rt_ack, ipdoa and
// ipdia (act0..act2); TranDeti is their OR.  The case checker raises
// AckSeqi when the input buffer shows the deadlock pattern of a router just
// after a faulty link:
//   case 1:  rt_ack & (ipdia == ipdoa)      path granted, acks stuck equal
//   case 2: !rt_ack & !ipdia & !ipdoa        head flit never completed
//   case 3: !rt_ack &  ipeop & !ipdoa        fake tail from a stuck eop wire
// The state machine has three flip-flops {err_conf, err_r, start}:
//   Idle    000 --timeout--> Start
//   Start   001 --timeout & !TranDeti & AckSeqi--> Enquiry, else --timeout--> Idle
//   Enquiry 011 --AckSeqo (at once)--> Idle
//               --timeout & !TranDeto & !act2--> Confirm, else --timeout--> Idle
//   Confirm 111 --timeout & (TranDeto | act2)--> Idle (the fault has gone)
// err_r asks the upstream output VC to report AckSeqo and TranDeto; err_conf
// blocks that VC and starts Drain upstream and Release here.
//
// Timing: the detectors run on eclk (asynchronous side), the state machine
// on clk, with timeout a one-cycle enable.  The sampled signals need no
// synchronizer: a stable deadlock is required over a whole period before a
// transition that matters, and a sample taken during a change only sends the
// machine to Idle or to a re-check.  The states, encoding and arcs are the
// design's; making the Enquiry-to-Idle return at the next clk edge rather
// than through an asynchronous reset is this design's choice.
module ivc_fault_detector
  import sdm_pkg::*;
(
  input  logic eclk,
  input  logic clk,
  input  logic rst_n,
  input  logic timeout,
  input  logic rt_ack,
  input  logic ipdia,
  input  logic ipdoa,
  input  logic ipeop,
  input  logic trandeto,
  input  logic ackseqo,
  output logic err_r,
  output logic err_conf,
  output logic start,
  output logic ackseqi,
  output logic trandeti
);

  fd_state_e st_q;
  logic act0, act1, act2;

  transition_detector u_td0 (.eclk(eclk), .rst_n(rst_n), .ena(start), .sig(rt_ack), .act(act0));
  transition_detector u_td1 (.eclk(eclk), .rst_n(rst_n), .ena(start), .sig(ipdoa),  .act(act1));
  transition_detector u_td2 (.eclk(eclk), .rst_n(rst_n), .ena(start), .sig(ipdia),  .act(act2));

  assign trandeti = act0 || act1 || act2;

  // case checker
  assign ackseqi = ( rt_ack && (ipdia == ipdoa))
                || (!rt_ack && !ipdia && !ipdoa)
                || (!rt_ack &&  ipeop && !ipdoa);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_q <= FD_IDLE;
    else begin
      unique case (st_q)
        FD_IDLE:    if (timeout) st_q <= FD_START;
        FD_START:   if (timeout) st_q <= (!trandeti && ackseqi) ? FD_ENQUIRY : FD_IDLE;
        FD_ENQUIRY: if (ackseqo) st_q <= FD_IDLE;
                    else if (timeout) st_q <= (!trandeto && !act2) ? FD_CONFIRM : FD_IDLE;
        FD_CONFIRM: if (timeout && (trandeto || act2)) st_q <= FD_IDLE;
        default:    st_q <= FD_IDLE;
      endcase
    end
  end

  assign {err_conf, err_r, start} = st_q;

endmodule
