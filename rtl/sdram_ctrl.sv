// sdram_ctrl: single-port SDR SDRAM controller for the frame buffer.
//
// The frame buffer holds one sensor frame, one sensor row per SDRAM row
// (bank 0, row = ROW_BASE + sensor row, columns 0..WORDS-1, two 8-bit
// pixels per 16-bit word). Two kinds of transfer exist, each one whole
// sensor row long:
//   * WRITE: wr_req asks to store row wr_row. Once the input FIFO holds
//     WORDS words the controller opens the row, issues WRITE at column 0
//     and streams WORDS words out of the FIFO in a full-page burst, stops it
//     with BURST TERMINATE and precharges.
//   * READ: rd_req asks to fetch row rd_row. The controller opens the row,
//     issues READ at column 0 and pushes the WORDS words that come back
//     CAS_LAT clocks later into the output FIFO, again stopping the
//     full-page burst with BURST TERMINATE.
// Reads are requested at the start of a video line and writes late in the
// sensor row, so the two never compete for the bus; the FSM therefore has
// no look-ahead read stage and serves requests in the order refresh, read,
// write. An auto-refresh is issued every REF_INTERVAL clocks. After reset the
// controller waits INIT_CYCLES (100 us), precharges all banks, issues
// INIT_REFRESHES auto-refreshes and loads the mode register (full-page
// burst, sequential, CAS latency CAS_LAT, burst writes), then raises ready.
//
// Command, address and write data are registered outputs; the SDRAM samples
// them at the next rising edge. Read data is taken from dq_i CAS_LAT + 1
// controller clocks after READ was registered. The DQ bus is split into
// dq_o/dq_oe/dq_i; the bidirectional pad is outside this module. sd_ba
// stays 0 because one frame fits in bank 0, and out_data is dq_i itself
// (the output FIFO write is what is timed).
//
// Follows the document: 108 MHz clock, 16-bit IS42S16160B, row-sized R/W
// operations separated in time, a simple FSM without PRE_READ. Own choices:
// the address map, full-page bursts, timing counts (from the speed grade of
// a 16M x 16 part at 108 MHz), request priority.
module sdram_ctrl
  import swir_pkg::*;
#(
  parameter int unsigned WORDS          = 320,    // 16-bit words per sensor row
  parameter int unsigned ROW_BASE       = 0,
  parameter int unsigned CAS_LAT        = 3,
  parameter int unsigned T_RCD          = 3,      // 20 ns
  parameter int unsigned T_RP           = 3,      // 20 ns
  parameter int unsigned T_RFC          = 8,      // 66 ns
  parameter int unsigned T_MRD          = 2,
  parameter int unsigned T_WR           = 2,
  parameter int unsigned INIT_CYCLES    = 10800,  // 100 us at 108 MHz
  parameter int unsigned INIT_REFRESHES = 8,
  parameter int unsigned REF_INTERVAL   = 800,    // < 7.8 us at 108 MHz
  parameter int unsigned FIFO_DEPTH     = 512
) (
  input  logic        clk,          // 108 MHz
  input  logic        rst_n,
  output logic        ready,

  input  logic        wr_req,       // pulse, this clock domain
  input  logic [9:0]  wr_row,
  input  logic        rd_req,       // pulse, this clock domain
  input  logic [9:0]  rd_row,

  // input FIFO, read side (show-ahead)
  input  logic [15:0] in_data,
  input  logic [$clog2(FIFO_DEPTH):0] in_level,
  output logic        in_rd,
  // output FIFO, write side
  output logic        out_wr,
  output logic [15:0] out_data,
  input  logic [$clog2(FIFO_DEPTH):0] out_level,

  // SDRAM pins
  output logic        sd_cke,
  output logic        sd_cs_n,
  output logic        sd_ras_n,
  output logic        sd_cas_n,
  output logic        sd_we_n,
  output logic [1:0]  sd_ba,
  output logic [12:0] sd_addr,
  output logic [1:0]  sd_dqm,
  output logic [15:0] sd_dq_o,
  output logic        sd_dq_oe,
  input  logic [15:0] sd_dq_i,

  // activity pulses (for monitoring)
  output logic        ev_refresh,
  output logic        ev_write,
  output logic        ev_read
);
  typedef enum logic [3:0] {
    S_INIT_WAIT, S_INIT_PRE, S_INIT_REF, S_INIT_LMR,
    S_IDLE, S_ACT, S_WR_BURST, S_RD_BURST, S_BST_WAIT, S_PRE, S_REF, S_WAIT
  } state_e;

  // 13-bit mode register: burst write, CL, sequential, full page.
  localparam logic [12:0] MODE_REG = {3'b000, 1'b0, 2'b00, 3'(CAS_LAT), 1'b0, 3'b111};

  state_e      state, after_wait;
  sdram_cmd_e  cmd;
  logic [15:0] wait_cnt;
  logic [9:0]  burst_cnt;
  logic [3:0]  init_ref_cnt;
  logic [15:0] ref_cnt;
  logic        ref_pend, wr_pend, rd_pend, doing_read;
  logic [9:0]  wr_row_q, rd_row_q;
  logic [CAS_LAT+1:0] rdv;           // read-data valid pipeline

  assign {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} = cmd;

  // Show-ahead input FIFO: pop one word per write-burst cycle.
  assign in_rd    = ((state == S_ACT) && !doing_read) ||
                    ((state == S_WR_BURST) && (burst_cnt < 10'(WORDS)));
  assign out_wr   = rdv[CAS_LAT];
  assign out_data = sd_dq_i;

  logic can_write, can_read;
  assign can_write = wr_pend && (in_level >= ($clog2(FIFO_DEPTH)+1)'(WORDS));
  assign can_read  = rd_pend && (out_level <= ($clog2(FIFO_DEPTH)+1)'(FIFO_DEPTH - WORDS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_INIT_WAIT;
      after_wait   <= S_IDLE;
      cmd          <= CMD_NOP;
      sd_cke       <= 1'b0;
      sd_ba        <= '0;
      sd_addr      <= '0;
      sd_dqm       <= 2'b11;
      sd_dq_o      <= '0;
      sd_dq_oe     <= 1'b0;
      wait_cnt     <= 16'(INIT_CYCLES);
      burst_cnt    <= '0;
      init_ref_cnt <= '0;
      ref_cnt      <= '0;
      ref_pend     <= 1'b0;
      wr_pend      <= 1'b0;
      rd_pend      <= 1'b0;
      doing_read   <= 1'b0;
      wr_row_q     <= '0;
      rd_row_q     <= '0;
      ready        <= 1'b0;
      rdv          <= '0;
      ev_refresh   <= 1'b0;
      ev_write     <= 1'b0;
      ev_read      <= 1'b0;
    end else begin
      cmd        <= CMD_NOP;
      sd_dq_oe   <= 1'b0;
      ev_refresh <= 1'b0;
      ev_write   <= 1'b0;
      ev_read    <= 1'b0;
      rdv        <= {rdv[CAS_LAT:0], 1'b0};

      if (wr_req) begin wr_pend <= 1'b1; wr_row_q <= wr_row; end
      if (rd_req) begin rd_pend <= 1'b1; rd_row_q <= rd_row; end

      if (ready) begin
        if (ref_cnt == 16'(REF_INTERVAL - 1)) begin
          ref_cnt  <= '0;
          ref_pend <= 1'b1;
        end else begin
          ref_cnt <= ref_cnt + 1'b1;
        end
      end

      unique case (state)
        S_INIT_WAIT: begin
          sd_cke <= 1'b1;
          if (wait_cnt == '0) state <= S_INIT_PRE;
          else                wait_cnt <= wait_cnt - 1'b1;
        end
        S_INIT_PRE: begin
          cmd         <= CMD_PRECHARGE;
          sd_addr[10] <= 1'b1;                 // all banks
          wait_cnt    <= 16'(T_RP - 1);
          state       <= S_WAIT;
          after_wait  <= S_INIT_REF;
        end
        S_INIT_REF: begin
          if (init_ref_cnt == 4'(INIT_REFRESHES)) begin
            state <= S_INIT_LMR;
          end else begin
            cmd          <= CMD_REFRESH;
            init_ref_cnt <= init_ref_cnt + 1'b1;
            wait_cnt     <= 16'(T_RFC - 1);
            state        <= S_WAIT;
            after_wait   <= S_INIT_REF;
          end
        end
        S_INIT_LMR: begin
          cmd        <= CMD_LMR;
          sd_ba      <= '0;
          sd_addr    <= MODE_REG;
          wait_cnt   <= 16'(T_MRD - 1);
          state      <= S_WAIT;
          after_wait <= S_IDLE;
        end
        S_IDLE: begin
          ready  <= 1'b1;
          sd_dqm <= 2'b00;
          if (ref_pend) begin
            state <= S_REF;
          end else if (can_read || can_write) begin
            doing_read <= can_read;
            cmd        <= CMD_ACTIVE;
            sd_ba      <= '0;
            sd_addr    <= 13'(ROW_BASE) + 13'(can_read ? rd_row_q : wr_row_q);
            wait_cnt   <= 16'(T_RCD - 1);
            state      <= S_WAIT;
            after_wait <= S_ACT;
          end
        end
        S_ACT: begin
          // column command, auto-precharge off (A10 = 0)
          sd_addr   <= '0;
          burst_cnt <= '0;
          if (doing_read) begin
            cmd     <= CMD_READ;
            rd_pend <= 1'b0;
            rdv[0]  <= 1'b1;
            burst_cnt <= 10'd1;
            state   <= S_RD_BURST;
          end else begin
            cmd       <= CMD_WRITE;
            wr_pend   <= 1'b0;
            sd_dq_o   <= in_data;
            sd_dq_oe  <= 1'b1;
            burst_cnt <= 10'd1;
            state     <= S_WR_BURST;
          end
        end
        S_WR_BURST: begin
          if (burst_cnt < 10'(WORDS)) begin
            sd_dq_o   <= in_data;
            sd_dq_oe  <= 1'b1;
            burst_cnt <= burst_cnt + 1'b1;
          end else begin
            cmd        <= CMD_BST;
            ev_write   <= 1'b1;
            wait_cnt   <= 16'(T_WR - 1);
            state      <= S_BST_WAIT;
          end
        end
        S_RD_BURST: begin
          if (burst_cnt < 10'(WORDS)) begin
            rdv[0]    <= 1'b1;
            burst_cnt <= burst_cnt + 1'b1;
          end else begin
            cmd      <= CMD_BST;
            ev_read  <= 1'b1;
            wait_cnt <= 16'(CAS_LAT);
            state    <= S_BST_WAIT;
          end
        end
        S_BST_WAIT: begin
          if (wait_cnt == '0) state <= S_PRE;
          else                wait_cnt <= wait_cnt - 1'b1;
        end
        S_PRE: begin
          cmd         <= CMD_PRECHARGE;
          sd_addr[10] <= 1'b1;
          wait_cnt    <= 16'(T_RP - 1);
          state       <= S_WAIT;
          after_wait  <= S_IDLE;
        end
        S_REF: begin
          cmd        <= CMD_REFRESH;
          ref_pend   <= 1'b0;
          ev_refresh <= 1'b1;
          wait_cnt   <= 16'(T_RFC - 1);
          state      <= S_WAIT;
          after_wait <= S_IDLE;
        end
        S_WAIT: begin
          if (wait_cnt == '0) state <= after_wait;
          else                wait_cnt <= wait_cnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
