// cpu_model: behavioural bus-cycle model of an 8-bit processor (Z-80 class) as seen
// by the shared-memory arbiter. Testbench use only.
//
// A pulse on start begins one shared-memory access (read or write of one byte):
//   T1   : address, data and the active-low strobe are driven; REQUEST is pulsed
//          high for this one clock.
//   T2/Tw: WAIT is sampled at every clock edge; while it is low the model inserts
//          wait states (counted in wait_cycles).
//   T3   : the access completes; a read captures rdata at the end of T3. GRANT must
//          be active in T3, otherwise protocol_err is raised.
//   M1   : strobes are released and M1 is driven low for one clock - the opcode fetch
//          of the next instruction - which releases the shared bus.
// done pulses for one clock after M1; busy is high from start to done.
module cpu_model
  import smmp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              is_write,
  input  logic [CPU_AW-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              wait_n,
  input  logic              grant_n,
  input  logic [DATA_W-1:0] rdata,
  output logic              req,
  output logic              m1_n,
  output lbus_t             lbus,
  output logic              busy,
  output logic              done,
  output logic [DATA_W-1:0] rdata_out,
  output int                wait_cycles,
  output logic              protocol_err
);

  typedef enum logic [2:0] {S_IDLE, S_T1, S_T2W, S_T3, S_M1} state_t;
  state_t state;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      req          <= 1'b0;
      m1_n         <= 1'b1;
      lbus         <= LBUS_IDLE;
      done         <= 1'b0;
      rdata_out    <= '0;
      wait_cycles  <= 0;
      protocol_err <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state       <= S_T1;
          req         <= 1'b1;
          lbus.addr   <= addr;
          lbus.wdata  <= wdata;
          lbus.rd_n   <= is_write;
          lbus.wr_n   <= !is_write;
          wait_cycles <= 0;
        end
        S_T1: begin
          req   <= 1'b0;
          state <= S_T2W;
        end
        S_T2W: begin
          if (wait_n) state <= S_T3;
          else        wait_cycles <= wait_cycles + 1;
        end
        S_T3: begin
          if (grant_n) protocol_err <= 1'b1;
          if (!lbus.rd_n) rdata_out <= rdata;
          lbus.rd_n <= 1'b1;
          lbus.wr_n <= 1'b1;
          m1_n      <= 1'b0;
          state     <= S_M1;
        end
        S_M1: begin
          m1_n  <= 1'b1;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
