// urt_uc: the central unit's URT (receiver-transmitter), master of the link.
//
// On its own the URT sweeps the peripherals: it sends a checking message to
// address 1, waits for the inputs-state answer, stores it in an input image
// and moves on to the next address up to LAST_ADDR, then starts again at 1.
// A missing answer (no frame within TIMEOUT_BITS bit cells), a bad CRC, a
// wrong length or a wrong address is a fault, and the same message is sent
// again, up to RETRIES times more. If the resends fail as well, `fail` is
// raised, the failing address is kept and the sweep stops. The processor can
// queue a message of any type (check, digital, mixed, switch-off); it goes
// out between two sweep transactions, with the same retry rule, and its
// sending clears `fail` and restarts the sweep at address 1. A switch-off
// message is a broadcast to address 0 and expects no answer. The sweep order,
// the five resends, the failure signal and the restart by a processor
// message follow the protocol. The register map, the input image, the
// timeout, the gap between messages and the restart at address 1 are this
// design's choices.
//
// Register map (byte-wide, `addr` is the offset inside the URT page):
//   0x00 W  bit0 = 1: send the message in 0x01..0x05
//        R  {4'b0, last_ok, sweeping, fail, busy}: busy = a processor
//           message is queued or under way; last_ok = the last one was
//           answered (or was a switch-off)
//   0x01 RW message address [4:0]        0x02 RW message type [1:0]
//   0x03 RW digital outputs [7:0]        0x04 RW digital outputs [9:8]
//   0x05 RW analogue output              0x06 RW last swept address [4:0]
//   0x07 R  address that failed
//   0x80 + 4*a + k  R  input image of peripheral a:
//        k=0 digital inputs [7:0], k=1 [9:8], k=2 analogue input,
//        k=3 bit0 = an answer has been stored
// Bus writes are one-clock strobes; reads are combinational.
module urt_uc
  import urt_pkg::*;
#(
  parameter int unsigned HALF          = HALF_BIT_CLKS,
  parameter int unsigned RETRIES       = 5,
  parameter int unsigned TIMEOUT_BITS  = 64,
  parameter int unsigned GAP_BITS      = 2,
  parameter logic [ADDR_W-1:0] LAST_ADDR_RST = 5'd31
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor bus
  input  logic        bus_sel,
  input  logic        bus_wr,     // one-clock write strobe
  input  logic [7:0]  bus_addr,
  input  logic [7:0]  bus_wdata,
  output logic [7:0]  bus_rdata,
  // line
  input  logic        line_in,
  output logic        line_out,
  output logic        fail        // sweep stopped after repeated faults
);

  localparam int unsigned TIMEOUT_CLKS = TIMEOUT_BITS * 2 * HALF;
  localparam int unsigned GAP_CLKS     = GAP_BITS * 2 * HALF;
  localparam int unsigned TMW = $clog2(TIMEOUT_CLKS + GAP_CLKS + 2);
  localparam int unsigned NPER = 1 << ADDR_W;

  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    msg_type_e         mtype;
    logic [DIG_W-1:0]  dout;
    logic [ANA_W-1:0]  aout;
  } msg_t;

  typedef struct packed {
    logic             valid;
    logic [DIG_W-1:0] din;
    logic [ANA_W-1:0] ain;
  } image_t;

  typedef enum logic [2:0] {S_SELECT, S_TX, S_TXWAIT, S_WAIT, S_GAP} state_e;

  // processor-visible registers
  msg_t              cpu_msg;
  logic [ADDR_W-1:0] last_addr, fail_addr;
  logic              pending, last_ok;
  image_t            image [NPER];

  // transaction state
  state_e            state;
  msg_t              cur;
  logic              is_cpu, retry;
  logic [2:0]        tries;
  logic [ADDR_W-1:0] sweep_addr;
  logic [TMW-1:0]    timer;

  // frame units
  logic                   tx_start, tx_busy, tx_done;
  logic [MAX_PAYLOAD-1:0] tx_p;
  logic [LEN_W-1:0]       tx_len;
  logic                   rx_valid, rx_crc_ok;
  logic [MAX_PAYLOAD-1:0] rx_p;
  logic [LEN_W-1:0]       rx_len;

  always_comb begin
    unique case (cur.mtype)
      MSG_DIGITAL: begin tx_p = MAX_PAYLOAD'({cur.addr, cur.mtype, cur.dout});  tx_len = LEN_W'(LEN_DIG);   end
      MSG_MIXED:   begin tx_p = {cur.addr, cur.mtype, cur.dout, cur.aout};       tx_len = LEN_W'(LEN_MIXED); end
      default:     begin tx_p = MAX_PAYLOAD'({cur.addr, cur.mtype});             tx_len = LEN_W'(LEN_SHORT); end
    endcase
  end

  urt_frame_tx #(.HALF(HALF)) u_tx (
    .clk(clk), .rst_n(rst_n), .start(tx_start), .payload(tx_p), .len(tx_len),
    .busy(tx_busy), .done(tx_done), .line(line_out)
  );

  urt_frame_rx #(.HALF(HALF)) u_rx (
    .clk(clk), .rst_n(rst_n), .enable(state == S_WAIT), .line_in(line_in),
    .frame_valid(rx_valid), .payload(rx_p), .len(rx_len), .crc_ok(rx_crc_ok)
  );

  // answer check
  logic ans_good;
  assign ans_good = rx_valid && rx_crc_ok && rx_len == LEN_W'(LEN_ANSWER) &&
                    rx_p[22:18] == cur.addr;

  logic fault, success;
  assign fault   = state == S_WAIT && !ans_good && (rx_valid || timer == TMW'(TIMEOUT_CLKS));
  assign success = (state == S_WAIT && ans_good) ||
                   (state == S_TXWAIT && tx_done && cur.mtype == MSG_SWOFF);

  // processor message queued or not yet finished
  logic busy;
  assign busy = pending || (is_cpu && state != S_SELECT);

  logic cmd_wr;
  assign cmd_wr = bus_sel && bus_wr && bus_addr == 8'h00 && bus_wdata[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cpu_msg    <= '{addr: '0, mtype: MSG_CHECK, dout: '0, aout: '0};
      last_addr  <= LAST_ADDR_RST;
      fail_addr  <= '0;
      pending    <= 1'b0;
      last_ok    <= 1'b0;
      fail       <= 1'b0;
      state      <= S_SELECT;
      cur        <= '{addr: '0, mtype: MSG_CHECK, dout: '0, aout: '0};
      is_cpu     <= 1'b0;
      retry      <= 1'b0;
      tries      <= '0;
      sweep_addr <= ADDR_W'(1);
      timer      <= '0;
      tx_start   <= 1'b0;
      for (int i = 0; i < NPER; i++) image[i] <= '0;
    end else begin
      tx_start <= 1'b0;

      // processor writes
      if (bus_sel && bus_wr) begin
        unique case (bus_addr)
          8'h00: if (bus_wdata[0]) pending <= 1'b1;
          8'h01: cpu_msg.addr       <= bus_wdata[ADDR_W-1:0];
          8'h02: cpu_msg.mtype      <= msg_type_e'(bus_wdata[1:0]);
          8'h03: cpu_msg.dout[7:0]  <= bus_wdata;
          8'h04: cpu_msg.dout[9:8]  <= bus_wdata[1:0];
          8'h05: cpu_msg.aout       <= bus_wdata;
          8'h06: last_addr          <= bus_wdata[ADDR_W-1:0];
          default: ;
        endcase
      end

      unique case (state)
        S_SELECT: begin
          retry <= 1'b0;
          tries <= '0;
          if (pending) begin
            pending  <= cmd_wr;     // taken; a new command may follow at once
            cur      <= cpu_msg;
            if (cpu_msg.mtype == MSG_SWOFF) cur.addr <= BCAST_ADDR;
            is_cpu   <= 1'b1;
            fail     <= 1'b0;       // a processor message ends a stopped sweep
            state    <= S_TX;
          end else if (!fail && last_addr != '0) begin
            cur      <= '{addr: sweep_addr, mtype: MSG_CHECK, dout: '0, aout: '0};
            is_cpu   <= 1'b0;
            state    <= S_TX;
          end
        end
        S_TX: begin
          tx_start <= 1'b1;
          state    <= S_TXWAIT;
        end
        S_TXWAIT: begin
          timer <= '0;
          if (tx_done) state <= (cur.mtype == MSG_SWOFF) ? S_GAP : S_WAIT;
        end
        S_WAIT: begin
          timer <= timer + 1'b1;
          if (ans_good) begin
            image[cur.addr] <= '{valid: 1'b1, din: rx_p[17:8], ain: rx_p[7:0]};
          end
          if (success || fault) begin
            state <= S_GAP;
            timer <= '0;
          end
        end
        S_GAP: begin
          timer <= timer + 1'b1;
          if (timer == TMW'(GAP_CLKS)) begin
            timer <= '0;
            state <= retry ? S_TX : S_SELECT;
            retry <= 1'b0;
          end
        end
        default: state <= S_SELECT;
      endcase

      // outcome of a transaction
      if (success) begin
        if (is_cpu) last_ok <= 1'b1;
        if (!is_cpu)
          sweep_addr <= (sweep_addr >= last_addr) ? ADDR_W'(1) : sweep_addr + 1'b1;
      end else if (fault) begin
        if (tries < 3'(RETRIES)) begin
          tries <= tries + 1'b1;
          retry <= 1'b1;
        end else begin
          fail       <= 1'b1;
          fail_addr  <= cur.addr;
          sweep_addr <= ADDR_W'(1);
          if (is_cpu) last_ok <= 1'b0;
        end
      end
    end
  end

  // processor reads
  always_comb begin
    bus_rdata = '0;
    if (bus_addr[7]) begin
      unique case (bus_addr[1:0])
        2'd0: bus_rdata = image[bus_addr[6:2]].din[7:0];
        2'd1: bus_rdata = {6'b0, image[bus_addr[6:2]].din[9:8]};
        2'd2: bus_rdata = image[bus_addr[6:2]].ain;
        default: bus_rdata = {7'b0, image[bus_addr[6:2]].valid};
      endcase
    end else begin
      unique case (bus_addr)
        8'h00: bus_rdata = {4'b0, last_ok, !fail && last_addr != '0, fail, busy};
        8'h01: bus_rdata = 8'(cpu_msg.addr);
        8'h02: bus_rdata = 8'(cpu_msg.mtype);
        8'h03: bus_rdata = cpu_msg.dout[7:0];
        8'h04: bus_rdata = {6'b0, cpu_msg.dout[9:8]};
        8'h05: bus_rdata = cpu_msg.aout;
        8'h06: bus_rdata = 8'(last_addr);
        8'h07: bus_rdata = 8'(fail_addr);
        default: bus_rdata = '0;
      endcase
    end
  end

  // A message is only started when the transmitter is free
  assert property (@(posedge clk) disable iff (!rst_n) tx_start |-> !tx_busy);

endmodule
