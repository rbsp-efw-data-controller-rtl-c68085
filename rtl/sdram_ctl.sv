// sdram_ctl: controller of the 256 MB bulk SDRAM (one 256Mx8 module, taken
// here as four 64Mx8 dies: 2 chip-select bits, 4 banks, 13 row and 11 column
// address bits; byte address = {cs[1:0], row[12:0], bank[1:0], col[10:0]}).
// When pwr_on rises the module is powered (sd_pwr_en) and, after PWR_WAIT
// cycles (about 0.5 s) for the supply to settle, the controller runs the
// standard initialization: PRECHARGE ALL, two AUTO REFRESH, LOAD MODE
// (burst length 1, CAS latency 2), on all dies, then raises active
// (SDRAM_Active). It then refreshes all dies every REF_INT cycles (7.8 us)
// and serves one access at a time on a request/ack port: ACTIVE, READ or
// WRITE of one byte or of four consecutive bytes (size4; byte 0 in bits
// 31:24) with the row closed by PRECHARGE afterwards. A request while not
// active ends at once with null set (SDRAM Null Cycle). Power-off drops
// active and the power enable. The power-up wait, refresh duty and null-cycle
// rule are the specification's; organisation and timings are this design's.
module sdram_ctl #(
  parameter int unsigned PWR_WAIT = 8388608,
  parameter int unsigned REF_INT  = 130,
  parameter int unsigned T_RP     = 2,
  parameter int unsigned T_RCD    = 2,
  parameter int unsigned T_RFC    = 5,
  parameter int unsigned T_MRD    = 2,
  parameter int unsigned CL       = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pwr_on,
  output logic        active,
  // access port
  input  logic        op_req,
  input  logic        op_we,
  input  logic        op_size4,
  input  logic [27:0] op_addr,
  input  logic [31:0] op_wdata,
  output logic        op_ack,
  output logic        op_null,
  output logic [31:0] op_rdata,
  // SDRAM pins
  output logic        sd_pwr_en,
  output logic        sd_cke,
  output logic [3:0]  sd_cs_n,
  output logic        sd_ras_n,
  output logic        sd_cas_n,
  output logic        sd_we_n,
  output logic [1:0]  sd_ba,
  output logic [12:0] sd_a,
  output logic [7:0]  sd_dq_out,
  output logic        sd_dq_oe,
  input  logic [7:0]  sd_dq_in
);
  typedef enum logic [3:0] {OFF, PWAIT, INIT_PRE, INIT_REF1, INIT_REF2, INIT_MRS, IDLE,
                            REFRESH, ACT, RW, RDWAIT, PRE, DONE} state_t;
  typedef enum logic [2:0] {C_NOP, C_PRE, C_REF, C_MRS, C_ACT, C_RD, C_WR} cmd_t;
  state_t      st;
  cmd_t        cmd;
  logic [23:0] cnt;
  logic [8:0]  rcnt;
  logic        ref_due;
  logic [2:0]  col_i;        // column command issued
  logic [2:0]  dat_i;        // read data captured
  logic [31:0] rbuf;
  logic [1:0]  ncs;
  logic        all_cs;
  logic [3:0]  rd_pipe;      // read data arriving CL cycles after each READ
  logic [2:0]  nbytes;

  assign nbytes = op_size4 ? 3'd4 : 3'd1;
  assign ncs    = op_addr[27:26];

  // command encoding
  always_comb begin
    sd_cs_n = all_cs ? 4'b0000 : ~(4'b0001 << ncs);
    {sd_ras_n, sd_cas_n, sd_we_n} = 3'b111;
    case (cmd)
      C_PRE: {sd_ras_n, sd_cas_n, sd_we_n} = 3'b010;
      C_REF: {sd_ras_n, sd_cas_n, sd_we_n} = 3'b001;
      C_MRS: {sd_ras_n, sd_cas_n, sd_we_n} = 3'b000;
      C_ACT: {sd_ras_n, sd_cas_n, sd_we_n} = 3'b011;
      C_RD:  {sd_ras_n, sd_cas_n, sd_we_n} = 3'b101;
      C_WR:  {sd_ras_n, sd_cas_n, sd_we_n} = 3'b100;
      default: ;
    endcase
    if (cmd == C_NOP) sd_cs_n = 4'b1111;
  end

  assign active    = (st != OFF) && (st != PWAIT) && (st != INIT_PRE) && (st != INIT_REF1)
                  && (st != INIT_REF2) && (st != INIT_MRS);
  assign sd_pwr_en = pwr_on;
  assign sd_cke    = (st != OFF) && (st != PWAIT);

  always_ff @(posedge clk) begin
    if (rst || !pwr_on) begin
      st <= OFF; cmd <= C_NOP; cnt <= '0; rcnt <= '0; ref_due <= 1'b0; col_i <= '0; dat_i <= '0;
      rbuf <= '0; all_cs <= 1'b0; sd_ba <= '0; sd_a <= '0; sd_dq_out <= '0;
      sd_dq_oe <= 1'b0; op_rdata <= '0; rd_pipe <= '0;
      // while powered off every request ends at once as a null cycle
      op_ack  <= !rst && op_req && !op_ack;
      op_null <= !rst && op_req && !op_ack;
    end else begin
      cmd <= C_NOP; op_ack <= 1'b0; op_null <= 1'b0; sd_dq_oe <= 1'b0;
      if (active) begin
        if (rcnt == 9'(REF_INT - 1)) begin rcnt <= '0; ref_due <= 1'b1; end
        else rcnt <= rcnt + 9'd1;
      end
      rd_pipe <= {rd_pipe[2:0], 1'b0};
      if (st == OFF) begin
        st <= PWAIT; cnt <= '0;
      end else if (op_req && !active && !op_ack) begin
        op_ack <= 1'b1; op_null <= 1'b1; op_rdata <= '0;
      end
      case (st)
        PWAIT: if (cnt == 24'(PWR_WAIT - 1)) begin
          st <= INIT_PRE; cnt <= '0; cmd <= C_PRE; all_cs <= 1'b1; sd_a[10] <= 1'b1;
        end else cnt <= cnt + 24'd1;
        INIT_PRE: if (cnt == 24'(T_RP)) begin st <= INIT_REF1; cnt <= '0; cmd <= C_REF; end
                  else cnt <= cnt + 24'd1;
        INIT_REF1: if (cnt == 24'(T_RFC)) begin st <= INIT_REF2; cnt <= '0; cmd <= C_REF; end
                   else cnt <= cnt + 24'd1;
        INIT_REF2: if (cnt == 24'(T_RFC)) begin
          st <= INIT_MRS; cnt <= '0; cmd <= C_MRS; sd_ba <= '0; sd_a <= 13'b000_0_00_010_0_000;
        end else cnt <= cnt + 24'd1;
        INIT_MRS: if (cnt == 24'(T_MRD)) begin st <= IDLE; cnt <= '0; all_cs <= 1'b0; end
                  else cnt <= cnt + 24'd1;
        IDLE: begin
          if (ref_due) begin
            ref_due <= 1'b0; all_cs <= 1'b1; cmd <= C_REF; st <= REFRESH; cnt <= '0;
          end else if (op_req && !op_ack) begin
            all_cs <= 1'b0; cmd <= C_ACT; sd_ba <= op_addr[12:11]; sd_a <= op_addr[25:13];
            st <= ACT; cnt <= '0;
          end
        end
        REFRESH: if (cnt == 24'(T_RFC)) begin st <= IDLE; all_cs <= 1'b0; end
                 else cnt <= cnt + 24'd1;
        ACT: if (cnt == 24'(T_RCD - 1)) begin st <= RW; col_i <= '0; dat_i <= '0; end
             else cnt <= cnt + 24'd1;
        RW: begin
          if (col_i != nbytes) begin
            cmd   <= op_we ? C_WR : C_RD;
            sd_a  <= {2'b00, op_addr[10:0] + 11'(col_i)};
            col_i <= col_i + 3'd1;
            if (op_we) begin
              sd_dq_oe  <= 1'b1;
              sd_dq_out <= op_size4 ? op_wdata[31 - 8*col_i[1:0] -: 8] : op_wdata[7:0];
            end else rd_pipe[0] <= 1'b1;
          end else if (op_we) begin
            st <= PRE; cmd <= C_PRE; sd_a[10] <= 1'b0; cnt <= '0;
          end else st <= RDWAIT;
        end
        RDWAIT: if (dat_i == nbytes) begin
          st <= PRE; cmd <= C_PRE; sd_a[10] <= 1'b0; cnt <= '0;
        end
        PRE: if (cnt == 24'(T_RP)) begin
          st <= IDLE; op_ack <= 1'b1;
          op_rdata <= op_size4 ? rbuf : {24'b0, rbuf[31:24]};
        end else cnt <= cnt + 24'd1;
        default: ;
      endcase
      // read data capture, CL cycles after the READ command (pipe stage CL)
      if (rd_pipe[CL]) begin
        rbuf[31 - 8*dat_i[1:0] -: 8] <= sd_dq_in;
        dat_i <= dat_i + 3'd1;
      end
    end
  end
endmodule
