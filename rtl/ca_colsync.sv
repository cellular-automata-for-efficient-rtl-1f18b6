// ca_colsync: column-wide completion signal for one column of the CA array.
//
// Without it, a column passes each signal on as soon as that signal is ready,
// so the spread of arrival times in one column carries over into the next.
// With column synchronisation on, every cell that takes part in the column's
// work for a pattern reports when it has finished; once all of them have,
// the column's release is raised for one clock, and the cells hand their
// results to the next column together.
//
// Ports: en (column synchronisation on), ok[r] (row r takes no part, or has
// finished), cmp[r] (row r has finished), rel (all participants finished;
// combinational, one clock long because the cells clear cmp on it).
//
// The published design keeps a per-column count of finished cells and
// compares it with the column's cell count; this module forms the same
// condition as an AND over the cells, which needs no preloaded count.
module ca_colsync #(
  parameter int unsigned ROWS = 32
) (
  input  logic            en,
  input  logic [ROWS-1:0] ok,
  input  logic [ROWS-1:0] cmp,
  output logic            rel
);
  assign rel = en && (&ok) && (|cmp);
endmodule
