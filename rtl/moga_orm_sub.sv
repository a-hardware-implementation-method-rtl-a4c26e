// moga_orm_sub: one stage of the overlap rejection chain, owning population slot IDX.
//
// The stage keeps a copy of the fitness vector of individual IDX (fit_p) and a
// free flag, set when that individual is a duplicate that a later offspring may
// overwrite. Duplicates are recognised by equal fitness vectors, not by
// comparing chromosomes. For each offspring record passing through:
//   found already set : if fit_p equals the offspring's fitness, set free
//                       (the duplicate becomes replaceable, policy 2/3)
//   selected and IDX is the parent's address : overwrite slot IDX with the
//                       offspring, set found (policy 1)
//   fit_p equals the offspring's fitness : set found, no write (policy 2)
//   free and IDX is not the parent's address, and individual IDX does not
//                       dominate the offspring : overwrite slot IDX, set found,
//                       clear free (policy 3)
// An initial-load record for address IDX overwrites the slot unconditionally.
// A write is recorded in the record itself (wr, wr_addr); the population
// memory is written when the record leaves the last stage.
// Timing: one record per clock, out_o registered one clock after in_i.
module moga_orm_sub
  import moga_pkg::*;
#(
  parameter int IDX = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  orm_t    in_i,
  output orm_t    out_o,
  output fitvec_t fit_p_o,   // stored fitness of individual IDX
  output logic    free_o     // free flag of individual IDX
);
  localparam addr_t MY_ADDR = addr_t'(IDX);

  fitvec_t fit_p;
  logic    free_p;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fit_p  <= '0;
      free_p <= 1'b0;
      out_o  <= '0;
    end else begin
      out_o <= in_i;
      if (in_i.valid) begin
        if (in_i.init) begin
          if (in_i.ow_addr == MY_ADDR) begin
            fit_p         <= in_i.fit;
            free_p        <= 1'b0;
            out_o.found   <= 1'b1;
            out_o.wr      <= WR_INIT;
            out_o.wr_addr <= MY_ADDR;
          end
        end else if (in_i.found) begin
          if (fit_p == in_i.fit) free_p <= 1'b1;
        end else if (in_i.selected && in_i.ow_addr == MY_ADDR) begin
          fit_p         <= in_i.fit;
          out_o.found   <= 1'b1;
          out_o.wr      <= WR_PARENT;
          out_o.wr_addr <= MY_ADDR;
        end else if (fit_p == in_i.fit) begin
          out_o.found   <= 1'b1;
        end else if (free_p && in_i.ow_addr != MY_ADDR && !dominates(fit_p, in_i.fit)) begin
          fit_p         <= in_i.fit;
          free_p        <= 1'b0;
          out_o.found   <= 1'b1;
          out_o.wr      <= WR_FREE;
          out_o.wr_addr <= MY_ADDR;
        end
      end
    end
  end

  assign fit_p_o = fit_p;
  assign free_o  = free_p;
endmodule
