// sdram_model: behavioural model of a 16M x 16 SDR SDRAM (4 banks, 8192
// rows, 512 columns), for simulation only.
//
// Decodes the commands sampled on each rising edge: ACTIVE opens a row,
// READ and WRITE start a burst at a column (page bursts when the mode
// register's burst length field is 111b, else single words), BURST
// TERMINATE ends the running burst, PRECHARGE closes one or all banks,
// REFRESH and LOAD MODE REGISTER. Read data appears so that the controller
// sees it on the CL-th rising edge after the READ edge. Storage is a sparse
// associative array. Protocol errors are counted in `errors`: a command
// other than NOP/PRECHARGE/REFRESH/LMR before the mode register is loaded,
// ACTIVE to an open bank, READ/WRITE to a closed bank or sooner than T_RCD
// after ACTIVE, REFRESH with a bank open, any command within T_RP after
// PRECHARGE or T_RFC after REFRESH.
module sdram_model #(
  parameter int T_RCD = 3,
  parameter int T_RP  = 3,
  parameter int T_RFC = 8
) (
  input  logic        clk,
  input  logic        cke,
  input  logic        cs_n,
  input  logic        ras_n,
  input  logic        cas_n,
  input  logic        we_n,
  input  logic [1:0]  ba,
  input  logic [12:0] addr,
  input  logic [1:0]  dqm,
  input  logic [15:0] dq_in,      // from the controller
  input  logic        dq_oe,
  output logic [15:0] dq_out      // to the controller
);
  logic [15:0] mem [int];
  logic [12:0] open_row [4];
  bit          is_open  [4];
  int          act_time [4];
  int          busy_until = 0;
  int          now = 0;
  int          errors = 0, n_refresh = 0, n_read = 0, n_write = 0, n_words_w = 0, n_words_r = 0;
  bit          mode_set = 0;
  int          cl = 3;
  bit          page = 0;

  // burst state
  bit          rd_act = 0, wr_act = 0;
  logic [1:0]  b_bank;
  logic [8:0]  b_col;
  int          b_left;

  logic [15:0] pipe_d [8];
  bit          pipe_v [8];

  function automatic int key(input logic [1:0] b, input logic [12:0] r, input logic [8:0] c);
    return int'({b, r, c});
  endfunction

  function automatic logic [15:0] rdmem(input int k);
    if (mem.exists(k)) return mem[k];
    return 16'h0000;
  endfunction

  initial begin
    for (int i = 0; i < 4; i++) begin is_open[i] = 0; open_row[i] = '0; act_time[i] = 0; end
    for (int i = 0; i < 8; i++) begin pipe_v[i] = 0; pipe_d[i] = '0; end
    dq_out = '0;
  end

  always @(posedge clk) begin
    logic [3:0] cmd;
    now++;
    cmd = {cs_n, ras_n, cas_n, we_n};

    // read pipeline: the entry at index 1 is presented now and sampled at the next edge
    for (int i = 0; i < 7; i++) begin pipe_d[i] = pipe_d[i+1]; pipe_v[i] = pipe_v[i+1]; end
    pipe_v[7] = 0;

    if (cke && cmd != 4'b0111 && !cs_n) begin
      if (now < busy_until) begin
        errors++; $display("SDRAM: command %b during tRP/tRFC at %0t", cmd, $time);
      end
      if (!mode_set && !(cmd inside {4'b0010, 4'b0001, 4'b0000})) begin
        errors++; $display("SDRAM: command %b before mode register set", cmd);
      end
      unique case (cmd)
        4'b0011: begin  // ACTIVE
          if (is_open[ba]) begin errors++; $display("SDRAM: ACTIVE to open bank"); end
          is_open[ba] = 1; open_row[ba] = addr; act_time[ba] = now;
        end
        4'b0101, 4'b0100: begin  // READ / WRITE
          if (!is_open[ba]) begin errors++; $display("SDRAM: column command to closed bank"); end
          if (now - act_time[ba] < T_RCD) begin errors++; $display("SDRAM: tRCD violated"); end
          rd_act = (cmd == 4'b0101); wr_act = (cmd == 4'b0100);
          b_bank = ba; b_col = addr[8:0]; b_left = page ? 512 : 1;
          if (rd_act) n_read++; else n_write++;
        end
        4'b0110: begin rd_act = 0; wr_act = 0; end  // BURST TERMINATE
        4'b0010: begin  // PRECHARGE
          rd_act = 0; wr_act = 0;
          if (addr[10]) for (int i = 0; i < 4; i++) is_open[i] = 0;
          else is_open[ba] = 0;
          busy_until = now + T_RP;
        end
        4'b0001: begin  // REFRESH
          for (int i = 0; i < 4; i++) if (is_open[i]) begin errors++; $display("SDRAM: REFRESH with open bank"); end
          n_refresh++;
          busy_until = now + T_RFC;
        end
        4'b0000: begin  // LOAD MODE REGISTER
          mode_set = 1; cl = int'(addr[6:4]); page = (addr[2:0] == 3'b111);
        end
        default: ;
      endcase
    end

    if (rd_act) begin
      pipe_d[cl - 1] = rdmem(key(b_bank, open_row[b_bank], b_col));
      pipe_v[cl - 1] = 1;
      n_words_r++;
      b_col++; b_left--; if (b_left == 0) rd_act = 0;
    end else if (wr_act) begin
      if (!dq_oe) begin errors++; $display("SDRAM: write burst without data"); end
      if (dqm == 2'b00) mem[key(b_bank, open_row[b_bank], b_col)] = dq_in;
      n_words_w++;
      b_col++; b_left--; if (b_left == 0) wr_act = 0;
    end

    dq_out <= pipe_v[0] ? pipe_d[0] : 16'hDEAD;
  end
endmodule
