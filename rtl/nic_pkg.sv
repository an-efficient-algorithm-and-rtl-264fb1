// nic_pkg: shared types and default constants of the multiprocessor NIC
// receive path.
//
// The defaults follow the evaluated configuration: six applications, a
// shared packet buffer of 600 packets, HBDA with alpha = 128 and history
// weights M/2 and M/4, application 2 as the highest-priority application, and
// two host-side output ports. Packet sizes are in 32-byte units; the three
// traffic mixes (average, heavy, actual) are provided as tables. The packet
// descriptor width (application id plus a 32-bit payload tag) and the input
// and priority buffer depths are this design's own choices.
package nic_pkg;

  localparam int unsigned APP_W  = 3;     // up to 8 applications
  localparam int unsigned DATA_W = 32;    // payload tag carried per packet

  localparam int unsigned N_APPS_DEF   = 6;
  localparam int unsigned BUF_PKTS_DEF = 600;
  localparam int unsigned ALPHA_DEF    = 128;
  localparam int unsigned HIST_A_DEF   = 2;   // T' adds History(1) * M / a
  localparam int unsigned HIST_B_DEF   = 4;   // T' adds History(2) * M / b
  localparam int unsigned PRIO_APP_DEF = 2;
  localparam int unsigned N_PORTS_DEF  = 2;
  localparam int unsigned FRAC_BITS    = 8;   // fraction bits of alpha / psize

  // Packet sizes in 32-byte units, queue 0 first.
  typedef int unsigned psize_t [N_APPS_DEF];
  localparam psize_t PSIZE_AVG    = '{8, 2, 8, 1, 4, 16};
  localparam psize_t PSIZE_HEAVY  = '{4, 2, 4, 1, 8, 16};
  localparam psize_t PSIZE_ACTUAL = '{1, 1, 1, 2, 16, 46};

  // One packet as it travels through the NIC.
  typedef struct packed {
    logic [APP_W-1:0]  app;
    logic [DATA_W-1:0] data;
  } pkt_t;

  // Event counters brought out of the NIC.
  typedef struct packed {
    logic [31:0] packets;     // packets decided by the control unit
    logic [31:0] accepted;    // accepted into the packet buffer directly
    logic [31:0] dropped;     // packets lost
    logic [31:0] flushes;     // speculative decisions of control unit 2 flushed
    logic [31:0] pairs;       // commits where both control units were used
    logic [31:0] hist_acc;    // accepted through the history threshold T'
    logic [31:0] moves;       // packets moved from the priority buffer
    logic [31:0] prio_saved;  // priority packets kept in the priority buffer
    logic [31:0] prio_lost;   // priority packets lost, priority buffer full
    logic [31:0] irqs;        // host interrupts raised
    logic [31:0] stored;      // packets written into the packet buffer
  } nic_stats_t;

  // Threshold scale factor alpha / psize in fixed point (FRAC_BITS fraction
  // bits), evaluated at elaboration time so no divider is built.
  function automatic int unsigned alpha_over_psize(int unsigned alpha,
                                                   int unsigned psize);
    return (alpha << FRAC_BITS) / ((psize == 0) ? 1 : psize);
  endfunction

endpackage
